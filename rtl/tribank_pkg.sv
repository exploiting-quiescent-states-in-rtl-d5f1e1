// tribank_pkg: constants and helpers shared by the TriBank register file.
//
// The defaults describe the main configuration: an 8-wide out-of-order
// machine whose rename bank (RF2) and retention bank (RF3) hold 128
// registers each, with a 16-entry fully associative operand bank (RF1)
// next to the functional units. RF1 has 2*IW read ports and IW write
// ports, RF2 has IW read and IW write ports, RF3 has IW read ports and
// there are IW transfer buses from RF2 to RF3; RF2 and RF3 reads take two
// cycles. These numbers follow the design being documented. The data
// width (64 bits, an Alpha-style integer file), the number of logical
// registers (32) and the width of an instruction id (16 bits) are this
// implementation's own choices.
package tribank_pkg;

  localparam int unsigned IW_DEF     = 8;    // issue / commit width
  localparam int unsigned NPHYS_DEF  = 128;  // registers in RF2 and in RF3
  localparam int unsigned NRF1_DEF   = 16;   // entries in RF1
  localparam int unsigned NLOG_DEF   = 32;   // logical registers
  localparam int unsigned XLEN_DEF   = 64;   // data width
  localparam int unsigned IDW_DEF    = 16;   // instruction id width
  localparam int unsigned RDLAT_DEF  = 2;    // RF2/RF3 read latency, cycles

  // Bank encoding used in RF1 tags and in the rename-map flag.
  localparam logic BANK_RF2 = 1'b0;
  localparam logic BANK_RF3 = 1'b1;

  // Instruction ids grow in program order and wrap around. a is older than
  // b when the wrapped difference a-b is negative. Valid as long as the
  // two ids are fewer than 2**(IDW-1) instructions apart.
  function automatic logic id_older(input logic [31:0] a, input logic [31:0] b,
                                    input int unsigned w);
    logic [31:0] d;
    d = (a - b) & ((32'd1 << w) - 32'd1);
    return d[w-1];
  endfunction

endpackage
