// tb_rf1_assoc: directed sequence on a 4-entry RF1. Checks hits and data,
// refusal when no entry is free or consumed, least-recently-consumed
// victim choice, that consumption marks work, retagging of a value moved
// from RF2 to RF3, invalidation, refresh-on-refill and a duplicate fill in
// one cycle.
module tb_rf1_assoc;
  localparam int unsigned NENT = 4, NRD = 2, NFILL = 2, NCONS = 2, NPHYS = 8, XLEN = 16, TW = 4;
  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][TW-1:0] rd_tag;
  logic [NRD-1:0] rd_hit;
  logic [NRD-1:0][XLEN-1:0] rd_data;
  logic [NFILL-1:0] fill_valid, fill_ok, fill_evict;
  logic flush;
  logic [NFILL-1:0][TW-1:0] fill_tag;
  logic [NFILL-1:0][XLEN-1:0] fill_data;
  logic [NCONS-1:0] cons_valid;
  logic [NCONS-1:0][TW-1:0] cons_tag;
  logic [NPHYS-1:0] xf_mask;
  logic [2*NPHYS-1:0] inval_mask;
  logic [NENT-1:0] valid_mask;
  int checks = 0, failures = 0, cyc = 0;

  rf1_assoc #(.NENT(NENT), .NRD(NRD), .NFILL(NFILL), .NCONS(NCONS), .NPHYS(NPHYS), .XLEN(XLEN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic logic [XLEN-1:0] val(input logic [TW-1:0] t);
    return XLEN'(16'hA000 + t);
  endfunction

  task automatic quiet();
    fill_valid = '0; cons_valid = '0; xf_mask = '0; inval_mask = '0; flush = 0;
  endtask

  // exp_ev: the fill must displace a value not yet consumed
  task automatic fill1(input logic [TW-1:0] t, input bit exp_ev, input string what);
    @(negedge clk); quiet();
    fill_valid[0] = 1; fill_tag[0] = t; fill_data[0] = val(t);
    #1 chk(fill_ok[0] && fill_evict[0] == exp_ev, what);
  endtask

  task automatic cons1(input logic [TW-1:0] t);
    @(negedge clk); quiet();
    cons_valid[0] = 1; cons_tag[0] = t;
  endtask

  task automatic expect_rd(input logic [TW-1:0] t, input bit hit, input string what);
    @(negedge clk); quiet();
    rd_tag[0] = t;
    #1 chk(rd_hit[0] == hit && (!hit || rd_data[0] == val(t)), what);
  endtask

  localparam logic [TW-1:0] A = 4'h1, B = 4'h2, C = 4'hB, D = 4'h4, E = 4'h5, F = 4'h6, G = 4'h7;

  initial begin
    quiet();
    rd_tag = '0; fill_tag = '0; fill_data = '0; cons_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two fills in one cycle
    @(negedge clk); quiet();
    fill_valid = 2'b11; fill_tag[0] = A; fill_tag[1] = B; fill_data[0] = val(A); fill_data[1] = val(B);
    #1 chk(fill_ok == 2'b11, "two fills accepted");
    expect_rd(A, 1, "hit A");
    expect_rd(B, 1, "hit B");
    fill1(C, 0, "fill C");
    fill1(D, 0, "fill D");
    expect_rd(E, 0, "miss E");
    chk(valid_mask == 4'hF, "RF1 full");
    // B consumed first, then A: B is the least recently consumed
    cons1(B);
    cons1(A);
    fill1(E, 0, "fill E over a consumed entry");
    expect_rd(B, 0, "B (least recently consumed) replaced");
    expect_rd(A, 1, "A kept");
    expect_rd(E, 1, "E present");
    fill1(F, 0, "fill F replaces A, the only consumed entry");
    expect_rd(A, 0, "A replaced");
    // nothing consumed: least recently used entry (C) goes, flagged
    fill1(G, 1, "forced replacement of an unconsumed value");
    expect_rd(C, 0, "C (least recently used) replaced");
    expect_rd(D, 1, "D kept");
    // D (RF2 register 4) moves to RF3: tag follows
    @(negedge clk); quiet(); xf_mask[4] = 1;
    @(negedge clk); quiet(); rd_tag[0] = 4'hC;
    #1 chk(rd_hit[0] && rd_data[0] == val(D), "retagged value found under RF3 tag");
    expect_rd(D, 0, "old RF2 tag gone");
    // E (RF2 register 5) released
    @(negedge clk); quiet(); inval_mask[E] = 1;
    expect_rd(E, 0, "released value dropped");
    fill1(C, 0, "fill C into the released entry");
    // refresh: consumed G is filled again, so it is protected again
    cons1(G);
    fill1(G, 0, "refill of a present value");
    fill1(A, 1, "refreshed entry not a consumed victim");
    expect_rd(G, 1, "refreshed G kept");
    // flush marks every entry consumed: next fill is an ordinary one
    @(negedge clk); quiet(); flush = 1;
    fill1(B, 0, "after flush entries are consumed");
    // duplicate tags in one cycle take one entry
    @(negedge clk); quiet();
    fill_valid = 2'b11; fill_tag[0] = E; fill_tag[1] = E; fill_data[0] = val(E); fill_data[1] = val(E);
    #1 chk(fill_ok == 2'b11 && fill_evict == 2'b00, "duplicate fills accepted");
    expect_rd(E, 1, "E back");
    expect_rd(B, 1, "B still there");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
