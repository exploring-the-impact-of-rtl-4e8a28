// q_module: RCQ quantization of one full-precision message.
//
// Maps a DW_IN-bit two's complement value h to a DW_OUT-bit sign-magnitude index
// Q(h) = {h < 0, Q*(|h|)}, where Q*(m) is 0 for m <= tau_0, j for tau_(j-1) < m <= tau_j and
// the largest index above the last threshold; the thresholds tau of the given VERSION live in
// ldpc_pkg. When a table exists for (DW_IN, DW_OUT, VERSION) the module is a 2^DW_IN-entry
// ROM addressed by h, its contents computed at elaboration from the thresholds; otherwise it
// falls back to a resize that keeps the sign and saturates the magnitude. Zero maps to a
// positive index 0. Purely combinational.
module q_module
  import ldpc_pkg::*;
#(
  parameter int unsigned DW_IN   = 7,
  parameter int unsigned DW_OUT  = 3,
  parameter int unsigned VERSION = 1
) (
  input  logic signed [DW_IN-1:0] din,
  output logic [DW_OUT-1:0]       dout
);
  localparam bit HAS_TABLE = (DW_IN == DWIDTH) && (DW_OUT == QBITS) &&
                             (VERSION >= 1) && (VERSION <= N_VERSIONS);
  localparam int MAXMAG = (1 << (DW_OUT-1)) - 1;

  localparam int unsigned VSAFE = HAS_TABLE ? VERSION : 1;  // table index used when filling
  typedef logic [DW_OUT-1:0] rom_t [1 << DW_IN];
  function automatic rom_t fill();
    rom_t rom;
    for (int a = 0; a < (1 << DW_IN); a++) begin
      int h   = (a >= (1 << (DW_IN-1))) ? a - (1 << DW_IN) : a;
      int mag = (h < 0) ? -h : h;
      rom[a] = {(h < 0), (DW_OUT-1)'(q_star(VSAFE, mag))};
    end
    return rom;
  endfunction
  // ROM contents, computed from the package table at elaboration
  localparam rom_t ROM = fill();

  if (HAS_TABLE) begin : g_rom
    assign dout = ROM[din];
  end else begin : g_resize
    int mag;
    always_comb begin
      mag  = (din < 0) ? -int'(din) : int'(din);
      if (mag > MAXMAG) mag = MAXMAG;
      dout = {din < 0, (DW_OUT-1)'(mag)};
    end
  end
endmodule
