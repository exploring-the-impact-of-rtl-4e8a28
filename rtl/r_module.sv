// r_module: RCQ reconstruction of one quantized message.
//
// Maps a DW_IN-bit sign-magnitude index d to a DW_OUT-bit two's complement value
// R(d) = sign(d) * R*(|d|), where R* is the reconstruction table of the given VERSION in
// ldpc_pkg. When (DW_IN, DW_OUT, VERSION) names an existing table (DW_IN = QBITS,
// DW_OUT = DWIDTH, VERSION 1..N_VERSIONS) the module is a 2^DW_IN-entry ROM whose contents
// are computed at elaboration from the table; otherwise it falls back to a plain resize that
// keeps the sign and the magnitude. Purely combinational.
module r_module
  import ldpc_pkg::*;
#(
  parameter int unsigned DW_IN   = 3,
  parameter int unsigned DW_OUT  = 7,
  parameter int unsigned VERSION = 1
) (
  input  logic [DW_IN-1:0]         din,
  output logic signed [DW_OUT-1:0] dout
);
  localparam bit HAS_TABLE = (DW_IN == QBITS) && (DW_OUT == DWIDTH) &&
                             (VERSION >= 1) && (VERSION <= N_VERSIONS);

  localparam int unsigned VSAFE = HAS_TABLE ? VERSION : 1;  // table index used when filling
  typedef logic [DW_OUT-1:0] rom_t [1 << DW_IN];
  function automatic rom_t fill();
    rom_t rom;
    for (int a = 0; a < (1 << DW_IN); a++) begin
      int m = R_TABLE[VSAFE-1][a % (1 << (DW_IN-1))];
      rom[a] = (a >= (1 << (DW_IN-1))) ? DW_OUT'(-m) : DW_OUT'(m);
    end
    return rom;
  endfunction
  // ROM contents, computed from the package table at elaboration
  localparam rom_t ROM = fill();

  if (HAS_TABLE) begin : g_rom
    assign dout = ROM[din];
  end else begin : g_resize
    logic [DW_IN-2:0] mag;
    assign mag  = din[DW_IN-2:0];
    assign dout = din[DW_IN-1] ? -DW_OUT'(mag) : DW_OUT'(mag);
  end
endmodule
