// rf1_assoc: the small operand bank (RF1) next to the functional units.
//
// Functional units read source operands only from RF1. It is a fully
// associative file of NENT entries, each holding a copy of one value of
// RF2 or RF3 together with its tag {bank, physical register}. A value is
// copied in when a waiting instruction that needs it becomes ready in the
// wakeup logic (fill ports), so it arrives just before it is consumed.
//
// Replacement is least-recently-consumed (LRC). Each entry has a
// 'consumed' flag, set when an instruction that uses the value executes -
// whether the operand came out of RF1 or off the bypass network (consume
// ports). A free entry is used first, then a consumed one; among consumed
// entries the one consumed longest ago goes first. A recency matrix
// rec[i][j] (entry i used more recently than entry j) gives that order; a
// fill or a consume makes an entry the most recent. When no entry is free
// or consumed, the least recently used entry is overwritten all the same
// (fill_evict = 1): waiting for a consumed entry could wait for ever when
// every entry belongs to an instruction whose other operand is still
// missing. The displaced value stays in RF2/RF3 and is copied again when
// its consumer asks. On a flush every entry counts as consumed, since the
// squashed consumers will never mark theirs. fill_ok is low only when
// more fills than entries arrive in one cycle.
//
// Tags follow the value when it moves: an entry tagged {RF2, p} becomes
// {RF3, p} in the cycle register p is transferred (xf_mask), and entries
// whose register is released are dropped (inval_mask, indexed by tag).
// A fill whose tag is already present refreshes that entry and clears its
// consumed flag, so the value is kept for the new consumer.
//
// Timing: reads are combinational on the registered state; fills,
// consumes, retagging and invalidation take effect at the clock edge.
// The entry count and the 2*IW read / IW write ports follow the documented
// configuration; the last-resort replacement, the flush rule, retagging, invalidation and the
// refresh-on-refill behaviour are this design's own choices.
module rf1_assoc
  import tribank_pkg::*;
#(
  parameter int unsigned NENT  = NRF1_DEF,
  parameter int unsigned NRD   = 2 * IW_DEF,
  parameter int unsigned NFILL = IW_DEF,
  parameter int unsigned NCONS = 2 * IW_DEF,
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned XLEN  = XLEN_DEF,
  localparam int unsigned AW   = $clog2(NPHYS),
  localparam int unsigned TW   = AW + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // operand reads
  input  logic [NRD-1:0][TW-1:0]     rd_tag,
  output logic [NRD-1:0]             rd_hit,
  output logic [NRD-1:0][XLEN-1:0]   rd_data,
  // copies from RF2 / RF3
  input  logic [NFILL-1:0]           fill_valid,
  input  logic [NFILL-1:0][TW-1:0]   fill_tag,
  input  logic [NFILL-1:0][XLEN-1:0] fill_data,
  output logic [NFILL-1:0]           fill_ok,
  output logic [NFILL-1:0]           fill_evict,
  // executed consumers
  input  logic [NCONS-1:0]           cons_valid,
  input  logic [NCONS-1:0][TW-1:0]   cons_tag,
  // RF2 registers moving to RF3, and released {bank,register} tags
  input  logic [NPHYS-1:0]           xf_mask,
  input  logic [2*NPHYS-1:0]         inval_mask,
  input  logic                       flush,
  output logic [NENT-1:0]            valid_mask
);

  localparam int unsigned EW = $clog2(NENT);

  logic [NENT-1:0]           valid_q, cons_q;
  logic [NENT-1:0][TW-1:0]   tag_q;
  logic [NENT-1:0][XLEN-1:0] data_q;
  logic [NENT-1:0][NENT-1:0] rec_q;

  // Effective state after this cycle's invalidation and retagging.
  logic [NENT-1:0]           valid_e;
  logic [NENT-1:0][TW-1:0]   tag_e;

  // Fill placement.
  logic [NFILL-1:0]          f_hit, f_new, f_live;
  logic [NFILL-1:0][EW-1:0]  f_slot;

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_hit[r]  = 1'b0;
      rd_data[r] = '0;
      for (int e = 0; e < NENT; e++)
        if (valid_q[e] && tag_q[e] == rd_tag[r]) begin
          rd_hit[r]  = 1'b1;
          rd_data[r] = data_q[e];
        end
    end
  end

  always_comb begin
    for (int e = 0; e < NENT; e++) begin
      valid_e[e] = valid_q[e] && !inval_mask[tag_q[e]];
      tag_e[e]   = tag_q[e];
      if (tag_q[e][TW-1] == BANK_RF2 && xf_mask[tag_q[e][AW-1:0]])
        tag_e[e][TW-1] = BANK_RF3;
    end
  end

  // Victim order. Each entry gets a class (0 free, 1 consumed, 2 not yet
  // consumed, 3 refreshed by a fill of this cycle and so not a victim) and
  // a rank inside its class (free: by index; others: least recently used
  // first). pos is the entry's place in the overall victim order.
  logic [NENT-1:0]           refreshed;
  logic [NENT-1:0][1:0]      vclass;
  logic [NENT-1:0][EW:0]     vpos;

  always_comb begin
    refreshed = '0;
    for (int f = 0; f < NFILL; f++)
      for (int e = 0; e < NENT; e++)
        if (fill_valid[f] && valid_e[e] && tag_e[e] == fill_tag[f]) refreshed[e] = 1'b1;
    for (int e = 0; e < NENT; e++)
      vclass[e] = !valid_e[e] ? 2'd0 : refreshed[e] ? 2'd3 : cons_q[e] ? 2'd1 : 2'd2;
    for (int e = 0; e < NENT; e++) begin
      vpos[e] = '0;
      for (int k = 0; k < NENT; k++)
        if (k != e) begin
          if (vclass[k] < vclass[e]) vpos[e] = vpos[e] + 1'b1;
          else if (vclass[k] == vclass[e]) begin
            if (vclass[e] == 2'd0 ? (k < e) : rec_q[e][k]) vpos[e] = vpos[e] + 1'b1;
          end
        end
    end
  end

  // Fill placement: a fill whose tag is present (or was placed by an
  // earlier fill port this cycle) reuses that entry; the j-th new fill
  // takes the entry at victim position j.
  always_comb begin
    int unsigned j;
    j      = 0;
    f_hit  = '0;
    f_new  = '0;
    f_live = '0;
    f_slot = '0;
    for (int f = 0; f < NFILL; f++) begin
      if (fill_valid[f]) begin
        for (int e = 0; e < NENT; e++)
          if (valid_e[e] && tag_e[e] == fill_tag[f]) begin
            f_hit[f] = 1'b1; f_slot[f] = EW'(e);
          end
        for (int g = 0; g < f; g++)
          if (f_new[g] && fill_tag[g] == fill_tag[f]) begin
            f_hit[f] = 1'b1; f_slot[f] = f_slot[g];
          end
        if (!f_hit[f]) begin
          for (int e = 0; e < NENT; e++)
            if (vclass[e] != 2'd3 && int'(vpos[e]) == int'(j)) begin
              f_new[f]  = 1'b1;
              f_slot[f] = EW'(e);
              f_live[f] = (vclass[e] == 2'd2);
            end
          j = j + 1;
        end
      end
    end
  end

  assign fill_ok    = f_hit | f_new;
  assign fill_evict = f_new & f_live;

  // Next consumed flags and recency order.
  logic [NENT-1:0]           used, cons_d;
  logic [NENT-1:0][NENT-1:0] rec_d;

  always_comb begin
    used = '0;
    for (int c = 0; c < NCONS; c++)
      for (int e = 0; e < NENT; e++)
        if (cons_valid[c] && valid_e[e] && tag_e[e] == cons_tag[c]) used[e] = 1'b1;
    cons_d = cons_q | used | {NENT{flush}};
    rec_d  = rec_q;
    for (int e = 0; e < NENT; e++)
      if (used[e])
        for (int k = 0; k < NENT; k++) begin
          rec_d[e][k] = (k != e);
          rec_d[k][e] = 1'b0;
        end
    for (int f = 0; f < NFILL; f++)
      if (f_hit[f] || f_new[f]) begin
        cons_d[f_slot[f]] = 1'b0;
        for (int k = 0; k < NENT; k++) begin
          rec_d[f_slot[f]][k] = (k != int'(f_slot[f]));
          rec_d[k][f_slot[f]] = 1'b0;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      cons_q  <= '0;
      tag_q   <= '0;
      data_q  <= '0;
      for (int i = 0; i < NENT; i++)
        for (int j = 0; j < NENT; j++) rec_q[i][j] <= (i > j);
    end else begin
      rec_q   <= rec_d;
      cons_q  <= cons_d;
      valid_q <= valid_e;
      tag_q   <= tag_e;
      for (int f = 0; f < NFILL; f++)
        if (f_new[f] || f_hit[f]) begin
          valid_q[f_slot[f]] <= 1'b1;
          tag_q[f_slot[f]]   <= fill_tag[f];
          data_q[f_slot[f]]  <= fill_data[f];
        end
    end
  end

  assign valid_mask = valid_q;

endmodule
