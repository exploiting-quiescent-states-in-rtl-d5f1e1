// tribank_rf: TriBank register file for a wide out-of-order core.
//
// Three banks replace one large monolithic file:
//   RF2 (rf2_bank)  rename bank. Destinations are allocated here at rename
//                   and results are written here at writeback.
//   RF3 (rf3_bank)  retention bank, same size, direct-mapped to RF2. A
//                   value that has been written moves from RF2 register p
//                   to RF3 register p as soon as RF3 register p is free;
//                   RF2 register p is then free for a new mapping at once.
//                   The RF3 copy is released when a later writer of the
//                   same logical register commits.
//   RF1 (rf1_assoc) small fully associative bank that alone feeds the
//                   functional units. A value is copied in from RF2 or RF3
//                   when an instruction needing it becomes ready in the
//                   wakeup logic, and replaced least-recently-consumed.
// The transfer selector (xfer_ctrl), the bank select table
// (bank_sel_table) and the rename/committed maps with per-mapping bank
// flags (rename_map) keep track of where each value lives.
//
// Interface, per cycle (all ports may be active together):
//   rename   IW slots: logical sources/destination and instruction id in;
//            physical sources, their bank flags and the new RF2 register
//            out, combinationally. rn_ready is low when RF2 has too few
//            free registers for the group (or during a flush); nothing is
//            renamed then.
//   wb       IW result writes into RF2.
//   fq       IW copy requests (an instruction's operand became ready): the
//            bank is chosen by the bank select table, both RF2 and RF3 are
//            read, and the value enters RF1 RDLAT cycles later. A request
//            for an RF2 value that has not been written yet is not
//            launched (fq_launch low); the consumer then takes the value
//            from the bypass network. fill_ok reports, RDLAT cycles after
//            launch, that RF1 took the value; fill_evict that it had to
//            displace a value not yet consumed.
//   rd       2*IW operand reads from RF1, combinational: register, rename
//            flag and consumer id in; hit, data and the bank used out.
//   cs       2*IW "operand consumed" marks from executed instructions,
//            giving the {bank, register} of the operand.
//   cm       IW commits in program order: logical destination, its RF2
//            register and the instruction id.
//   flush    squash every uncommitted instruction: the rename map returns
//            to the committed map and all registers it does not use are
//            released. No rename or commit may be presented with it, and
//            the core must not write back squashed results afterwards.
// Transfers need no port: up to IW per cycle happen on their own and are
// shown on xf_valid/xf_preg.
//
// Defaults are the documented main configuration: 8-wide, RF1 16 entries,
// RF2 and RF3 128 registers each with two-cycle reads, 8 transfer buses.
// What is this design's own: the 64-bit data width, 32 logical registers,
// 16-bit instruction ids, one-cycle transfer moves, the fill request
// check, the flush-based recovery and the RF1 retag/invalidate rules.
module tribank_rf
  import tribank_pkg::*;
#(
  parameter int unsigned IW    = IW_DEF,
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned NRF1  = NRF1_DEF,
  parameter int unsigned NLOG  = NLOG_DEF,
  parameter int unsigned XLEN  = XLEN_DEF,
  parameter int unsigned IDW   = IDW_DEF,
  parameter int unsigned RDLAT = RDLAT_DEF,
  localparam int unsigned AW   = $clog2(NPHYS),
  localparam int unsigned LW   = $clog2(NLOG),
  localparam int unsigned NRP  = 2 * IW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // rename
  input  logic [IW-1:0]               rn_valid,
  input  logic [IW-1:0]               rn_dst_valid,
  input  logic [IW-1:0][1:0][LW-1:0]  rn_lsrc,
  input  logic [IW-1:0][LW-1:0]       rn_ldst,
  input  logic [IW-1:0][IDW-1:0]      rn_id,
  output logic                        rn_ready,
  output logic [IW-1:0][AW-1:0]       rn_pdst,
  output logic [IW-1:0][1:0][AW-1:0]  rn_psrc,
  output logic [IW-1:0][1:0]          rn_sflag,
  // writeback into RF2
  input  logic [IW-1:0]               wb_valid,
  input  logic [IW-1:0][AW-1:0]       wb_preg,
  input  logic [IW-1:0][XLEN-1:0]     wb_data,
  // operand copy requests (wakeup ready)
  input  logic [IW-1:0]               fq_valid,
  input  logic [IW-1:0][AW-1:0]       fq_preg,
  input  logic [IW-1:0]               fq_flag,
  input  logic [IW-1:0][IDW-1:0]      fq_id,
  output logic [IW-1:0]               fq_launch,
  output logic [IW-1:0]               fill_ok,
  output logic [IW-1:0]               fill_evict,
  // operand reads from RF1
  input  logic [NRP-1:0][AW-1:0]      rd_preg,
  input  logic [NRP-1:0]              rd_flag,
  input  logic [NRP-1:0][IDW-1:0]     rd_id,
  output logic [NRP-1:0]              rd_hit,
  output logic [NRP-1:0][XLEN-1:0]    rd_data,
  output logic [NRP-1:0]              rd_bank,
  // consumed operands
  input  logic [NRP-1:0]              cs_valid,
  input  logic [NRP-1:0]              cs_bank,
  input  logic [NRP-1:0][AW-1:0]      cs_preg,
  // commit
  input  logic [IW-1:0]               cm_valid,
  input  logic [IW-1:0][LW-1:0]       cm_ldst,
  input  logic [IW-1:0][AW-1:0]       cm_pdst,
  input  logic [IW-1:0][IDW-1:0]      cm_id,
  // recovery
  input  logic                        flush,
  // status
  output logic [IW-1:0]               xf_valid,
  output logic [IW-1:0][AW-1:0]       xf_preg,
  output logic [AW:0]                 rf2_free_cnt,
  output logic [NRF1-1:0]             rf1_valid
);

  // ---------------- rename and allocation ----------------
  logic [IW-1:0] al_req, al_en;
  logic          al_ok;
  logic [NPHYS-1:0] rf2_alloc, rf2_written, rf3_busy;

  assign al_req   = rn_valid & rn_dst_valid;
  assign rn_ready = al_ok && !flush;
  assign al_en    = al_req & {IW{rn_ready}};

  // ---------------- freeing ----------------
  logic [NPHYS-1:0] xf_mask, cm_free2, cm_free3, live2, live3;
  logic [NPHYS-1:0] sq_free2, sq_free3, rf2_free, rf2_drop, rf3_free, elig;
  logic [2*NPHYS-1:0] inval;
  logic [IW-1:0]    cm_inrf2;

  assign sq_free2 = flush ? (rf2_alloc & ~live2) : '0;
  assign sq_free3 = flush ? (rf3_busy & ~live3) : '0;
  assign rf2_drop = cm_free2 | sq_free2;            // released without a move
  assign rf2_free = rf2_drop | xf_mask;
  assign rf3_free = cm_free3 | sq_free3;
  assign inval    = {rf3_free, rf2_drop};           // indexed by {bank, reg}
  assign elig     = (rf2_alloc & rf2_written & ~rf3_busy & ~rf2_drop) & {NPHYS{!flush}};

  // ---------------- blocks ----------------
  logic [IW-1:0][XLEN-1:0] rf2_rd, rf3_rd, xf_data;
  logic [3*IW-1:0][AW-1:0]  lk_preg;
  logic [3*IW-1:0][IDW-1:0] lk_id;
  logic [3*IW-1:0]          lk_flag, lk_bank;

  rename_map #(.NLOG(NLOG), .NPHYS(NPHYS), .IW(IW)) u_map (
    .clk, .rst_n,
    .rn_valid(rn_valid & {IW{rn_ready}}), .rn_lsrc, .rn_dst_valid, .rn_ldst,
    .rn_pdst, .rn_psrc, .rn_sflag,
    .xf_mask,
    .cm_valid, .cm_ldst, .cm_pdst, .cm_inrf2, .cm_free2, .cm_free3,
    .flush, .live2, .live3
  );

  rf2_bank #(.NPHYS(NPHYS), .IW(IW), .NBUS(IW), .XLEN(XLEN), .RDLAT(RDLAT), .NLOG(NLOG)) u_rf2 (
    .clk, .rst_n,
    .alloc_req(al_req), .alloc_en(al_en), .alloc_preg(rn_pdst), .alloc_ok(al_ok),
    .free_cnt(rf2_free_cnt),
    .wb_valid, .wb_preg, .wb_data,
    .rd_addr(fq_preg), .rd_data(rf2_rd),
    .xf_addr(xf_preg), .xf_data,
    .free_mask(rf2_free),
    .alloc_mask(rf2_alloc), .written_mask(rf2_written)
  );

  rf3_bank #(.NPHYS(NPHYS), .IW(IW), .NBUS(IW), .XLEN(XLEN), .RDLAT(RDLAT)) u_rf3 (
    .clk, .rst_n,
    .xf_valid, .xf_preg, .xf_data,
    .rd_addr(fq_preg), .rd_data(rf3_rd),
    .free_mask(rf3_free), .busy_mask(rf3_busy)
  );

  xfer_ctrl #(.NPHYS(NPHYS), .NBUS(IW)) u_xfer (
    .clk, .rst_n, .elig, .xf_valid, .xf_preg, .xf_mask
  );

  always_comb begin
    for (int f = 0; f < IW; f++) begin
      lk_preg[f] = fq_preg[f];
      lk_id[f]   = fq_id[f];
      lk_flag[f] = fq_flag[f];
    end
    for (int r = 0; r < NRP; r++) begin
      lk_preg[IW+r] = rd_preg[r];
      lk_id[IW+r]   = rd_id[r];
      lk_flag[IW+r] = rd_flag[r];
    end
  end

  bank_sel_table #(.NPHYS(NPHYS), .IDW(IDW), .NAL(IW), .NLK(3*IW), .NOW(IW), .NLOG(NLOG)) u_bst (
    .clk, .rst_n,
    .al_valid(al_en), .al_preg(rn_pdst), .al_id(rn_id),
    .rf2_free,
    .lk_preg, .lk_id, .lk_flag, .lk_bank,
    .ow_valid(cm_valid), .ow_preg(cm_pdst), .ow_id(cm_id), .ow_owned(cm_inrf2)
  );

  // ---------------- operand copies into RF1 ----------------
  typedef struct packed {
    logic          valid;
    logic          src;    // bank the data is read from
    logic          bank;   // bank of the tag (follows transfers)
    logic [AW-1:0] preg;
  } fill_t;

  fill_t [IW-1:0] fp_q [RDLAT];
  fill_t [IW-1:0] fq_in;
  fill_t [IW-1:0] f_out;
  logic  [IW-1:0][AW:0]     f_tag;
  logic  [IW-1:0][XLEN-1:0] f_data;

  // Follow this cycle's transfers and releases.
  function automatic fill_t track(fill_t x, logic [NPHYS-1:0] xm, logic [2*NPHYS-1:0] iv);
    fill_t y;
    y = x;
    if (iv[{x.bank, x.preg}]) y.valid = 1'b0;
    if (x.bank == BANK_RF2 && xm[x.preg]) y.bank = BANK_RF3;
    return y;
  endfunction

  always_comb begin
    for (int f = 0; f < IW; f++) begin
      fq_launch[f] = fq_valid[f] &&
                     (lk_bank[f] == BANK_RF3 ? rf3_busy[fq_preg[f]]
                                             : rf2_alloc[fq_preg[f]] && rf2_written[fq_preg[f]]);
      fq_in[f] = track('{valid: fq_launch[f], src: lk_bank[f], bank: lk_bank[f], preg: fq_preg[f]},
                       xf_mask, inval);
      f_out[f]  = track(fp_q[RDLAT-1][f], xf_mask, inval);
      f_tag[f]  = {f_out[f].bank, f_out[f].preg};
      f_data[f] = (f_out[f].src == BANK_RF3) ? rf3_rd[f] : rf2_rd[f];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < RDLAT; s++) fp_q[s] <= '0;
    end else begin
      fp_q[0] <= fq_in;
      for (int s = 1; s < RDLAT; s++)
        for (int f = 0; f < IW; f++) fp_q[s][f] <= track(fp_q[s-1][f], xf_mask, inval);
    end
  end

  // ---------------- RF1 ----------------
  logic [NRP-1:0][AW:0] rd_tag, cs_tag;
  logic [IW-1:0]        f_valid;

  always_comb begin
    for (int r = 0; r < NRP; r++) begin
      rd_bank[r] = lk_bank[IW+r];
      rd_tag[r]  = {lk_bank[IW+r], rd_preg[r]};
      cs_tag[r]  = {cs_bank[r], cs_preg[r]};
    end
    for (int f = 0; f < IW; f++) f_valid[f] = f_out[f].valid;
  end

  logic [IW-1:0] f_ok, f_ev;

  rf1_assoc #(.NENT(NRF1), .NRD(NRP), .NFILL(IW), .NCONS(NRP), .NPHYS(NPHYS), .XLEN(XLEN)) u_rf1 (
    .clk, .rst_n,
    .rd_tag, .rd_hit, .rd_data,
    .fill_valid(f_valid), .fill_tag(f_tag), .fill_data(f_data), .fill_ok(f_ok), .fill_evict(f_ev),
    .cons_valid(cs_valid), .cons_tag(cs_tag),
    .xf_mask, .inval_mask(inval), .flush,
    .valid_mask(rf1_valid)
  );

  assign fill_ok    = f_ok & f_valid;
  assign fill_evict = f_ev & f_valid;

  assert property (@(posedge clk) disable iff (!rst_n) flush |-> cm_valid == '0);

endmodule
