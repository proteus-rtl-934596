// lfsr: pseudo-random number source built from a linear feedback shift register.
//
// Random numbers in this NoC (injection decisions, random destinations,
// random choice among permitted routes) come from LFSRs, as real hardware
// would produce them. The register shifts left by one bit whenever en is
// high; the new bit 0 is the XOR of the tap bits (a Fibonacci LFSR). The
// taps are maximal-length polynomials, so a non-zero seed walks through all
// 2^WIDTH-1 non-zero states before repeating. A zero seed is replaced by 1,
// since the all-zero state would never leave. The width and the taps are
// this design's choice; the document only says that LFSRs are used.
//
// Timing: state changes on the rising clock edge after en; value is the
// current state.
module lfsr #(
  parameter int              WIDTH = 16,
  parameter logic [31:0]     SEED  = 32'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] value
);
  // Tap masks (bit i set = stage i+1 of the polynomial feeds back).
  function automatic logic [31:0] taps(input int w);
    case (w)
      8:       return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      16:      return 32'h0000_B400;  // x^16+x^14+x^13+x^11+1
      24:      return 32'h00E1_0000;  // x^24+x^23+x^22+x^17+1
      32:      return 32'h8020_0003;  // x^32+x^22+x^2+x^1+1
      default: return 32'h0000_B400;
    endcase
  endfunction

  localparam logic [WIDTH-1:0] TAPS      = WIDTH'(taps(WIDTH));
  localparam logic [WIDTH-1:0] SEED_NZ   = (WIDTH'(SEED) == '0) ? WIDTH'(1) : WIDTH'(SEED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= SEED_NZ;
    else if (en) value <= {value[WIDTH-2:0], ^(value & TAPS)};
  end

  initial begin
    assert (WIDTH == 8 || WIDTH == 16 || WIDTH == 24 || WIDTH == 32)
      else $error("lfsr: WIDTH must be 8, 16, 24 or 32");
  end
endmodule
