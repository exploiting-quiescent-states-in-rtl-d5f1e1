// rf_array: multi-ported register storage with pipelined reads.
//
// NREG words of XLEN bits, NWR write ports and NRD read ports. A read
// samples the array in the cycle its address is presented and returns the
// word RDLAT cycles later (RDLAT >= 1), so a two-cycle bank is modelled as a
// read followed by one extra pipeline stage. Writes take effect at the
// clock edge; when several write ports name the same word in one cycle the
// highest-numbered port wins. A read does not see a write of the same
// cycle. All words reset to zero. Used as the storage of the RF2 and RF3
// banks; port counts and latency are set by those banks.
module rf_array #(
  parameter int unsigned NREG  = 128,
  parameter int unsigned NWR   = 8,
  parameter int unsigned NRD   = 8,
  parameter int unsigned XLEN  = 64,
  parameter int unsigned RDLAT = 2,
  parameter int unsigned NPK   = 1,
  localparam int unsigned AW   = $clog2(NREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NWR-1:0]       we,
  input  logic [NWR-1:0][AW-1:0]   waddr,
  input  logic [NWR-1:0][XLEN-1:0] wdata,
  input  logic [NRD-1:0][AW-1:0]   raddr,
  output logic [NRD-1:0][XLEN-1:0] rdata,
  input  logic [NPK-1:0][AW-1:0]   paddr,
  output logic [NPK-1:0][XLEN-1:0] pdata
);

  logic [XLEN-1:0] mem [NREG];
  logic [NRD-1:0][XLEN-1:0] pipe [RDLAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) mem[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w]) mem[waddr[w]] <= wdata[w];
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < NRD; r++) pipe[0][r] <= mem[raddr[r]];
    for (int s = 1; s < RDLAT; s++) pipe[s] <= pipe[s-1];
  end

  assign rdata = pipe[RDLAT-1];

  always_comb
    for (int p = 0; p < NPK; p++) pdata[p] = mem[paddr[p]];

endmodule
