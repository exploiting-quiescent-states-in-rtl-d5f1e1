// bank_sel_table: decides, for each source operand, whether its value is
// read from RF2 or from RF3.
//
// Because RF2 register p is freed as soon as its value moves to RF3
// register p, the same number p can name two live values at once: an
// older one in RF3 and a newer one in RF2. The rename map carries a bank
// flag per mapping, but a consumer renamed before a transfer holds a stale
// flag. This table resolves that. It keeps, per physical register, the id
// of the instruction that currently owns RF2 register p and a select bit:
//   - when p moves to RF3 (or RF2 register p is freed otherwise) the id is
//     set to "highest" (kept as the flag max_q) and the select bit to 1;
//   - when p is allocated again in RF2 the id becomes that of the new
//     producer; the select bit is kept.
// A consumer with id c, source register p and rename flag f reads
//   bank = (c is older than the stored id) ? select bit : f
// where "highest" is newer than every id. Lookups are combinational, so
// the choice is made while both banks are read.
//
// A second lookup, used at commit, says whether RF2 register p still
// belongs to the instruction with id c (owned = not highest and id == c).
// Ids compare with wrap-around (tribank_pkg::id_older). Once the owner of
// RF2 register p commits (ow_valid with ow_owned), no instruction older
// than it is left in flight, so the comparison is switched off (done_q)
// and the consumer's flag decides; this keeps a long-lived RF2 mapping
// from being misjudged after the ids wrap. The highest-number marker kept
// as a separate bit, the done bit, the reset state and the commit lookup
// are this design's choices; the table itself and its
// update rules follow the documented mechanism.
module bank_sel_table
  import tribank_pkg::*;
#(
  parameter int unsigned NPHYS = NPHYS_DEF,
  parameter int unsigned IDW   = IDW_DEF,
  parameter int unsigned NAL   = IW_DEF,      // allocation ports
  parameter int unsigned NLK   = 3 * IW_DEF,  // bank lookups
  parameter int unsigned NOW   = IW_DEF,      // ownership lookups
  parameter int unsigned NLOG  = NLOG_DEF,
  localparam int unsigned AW   = $clog2(NPHYS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NAL-1:0]           al_valid,
  input  logic [NAL-1:0][AW-1:0]   al_preg,
  input  logic [NAL-1:0][IDW-1:0]  al_id,
  input  logic [NPHYS-1:0]         rf2_free,   // RF2 registers freed this cycle
  input  logic [NLK-1:0][AW-1:0]   lk_preg,
  input  logic [NLK-1:0][IDW-1:0]  lk_id,
  input  logic [NLK-1:0]           lk_flag,
  output logic [NLK-1:0]           lk_bank,
  input  logic [NOW-1:0]           ow_valid,   // the instruction commits
  input  logic [NOW-1:0][AW-1:0]   ow_preg,
  input  logic [NOW-1:0][IDW-1:0]  ow_id,
  output logic [NOW-1:0]           ow_owned
);

  logic [IDW-1:0]   id_q [NPHYS];
  logic [NPHYS-1:0] max_q, sel_q, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) begin
        id_q[i]  <= '0;
        max_q[i] <= !(i < NLOG);
        sel_q[i] <= !(i < NLOG);
        done_q[i] <= 1'b1;
      end
    end else begin
      for (int i = 0; i < NPHYS; i++)
        if (rf2_free[i]) begin
          max_q[i] <= 1'b1;
          sel_q[i] <= BANK_RF3;
        end
      for (int o = 0; o < NOW; o++)
        if (ow_valid[o] && ow_owned[o]) done_q[ow_preg[o]] <= 1'b1;
      for (int a = 0; a < NAL; a++)
        if (al_valid[a]) begin
          id_q[al_preg[a]]   <= al_id[a];
          max_q[al_preg[a]]  <= 1'b0;
          done_q[al_preg[a]] <= 1'b0;
        end
    end
  end

  always_comb begin
    for (int l = 0; l < NLK; l++) begin
      if (max_q[lk_preg[l]] ||
          (!done_q[lk_preg[l]] && id_older(32'(lk_id[l]), 32'(id_q[lk_preg[l]]), IDW)))
        lk_bank[l] = sel_q[lk_preg[l]];
      else
        lk_bank[l] = lk_flag[l];
    end
    for (int o = 0; o < NOW; o++)
      ow_owned[o] = !max_q[ow_preg[o]] && (id_q[ow_preg[o]] == ow_id[o]);
  end

endmodule
