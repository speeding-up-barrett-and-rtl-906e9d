// pi_multiplier: digit-serial multiple-precision by single-precision multiplier.
//
// This is the multiplier block used twice in the modular multiplier datapath:
// as pi1 it forms X * Y_i (an N-bit operand times one w-bit digit of Y), and
// as pi2 it forms q * M (the quotient digit times the modulus). Inside there
// is a single DW x DW multiplier, one adder and an (N+DW)-bit accumulator
// register, as drawn for pi1 and pi2 in the architecture. The N-bit operand
// `a` is cut into ND = ceil(N/DW) digits and consumed most significant digit
// first: acc <- acc * 2^DW + b * a_j, so no right-alignment logic is needed.
// The digit order and the accumulator update rule are choices of this design;
// the source only fixes the multiplier/adder/register structure and widths.
//
// With SIGNED_B = 1 the digit `b` is a two's complement number (the Barrett
// quotient estimate may be negative) and `p` is the two's complement product;
// `a` is always unsigned.
//
// Interface and timing:
//   start  : one-cycle request; `a` and `b` must stay stable from the start
//            cycle until `valid` is high.
//   valid  : high from ND cycles after the start cycle (the start edge writes
//            the first partial product, ND-1 further edges finish) until the
//            next start. The start edge clears it, except when ND = 1.
//   p      : product, held while valid is high.
module pi_multiplier
  import modmul_pkg::*;
#(
  parameter int unsigned N        = 256,  // width of the multiple-precision operand
  parameter int unsigned DW       = 32,   // digit width of the single-precision multiplier
  parameter bit          SIGNED_B = 1'b0  // interpret b as two's complement
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      a,
  input  logic [DW-1:0]     b,
  output logic              valid,
  output logic [N+DW-1:0]   p
);

  localparam int unsigned ND  = num_digits(N, DW);
  localparam int unsigned IW  = (ND > 1) ? $clog2(ND) : 1;
  localparam int unsigned PW  = N + DW;

  logic [ND*DW-1:0] a_pad;
  logic [IW-1:0]    idx;      // digit of `a` used in the current cycle
  logic             busy;
  logic [DW-1:0]    a_dig;
  logic [2*DW-1:0]  prod;
  logic [PW-1:0]    prod_ext;

  assign a_pad = {{(ND*DW-N){1'b0}}, a};

  // Digit select: on the start cycle the top digit, afterwards idx.
  logic [IW-1:0]    sel;
  assign sel = start ? IW'(ND-1) : idx;

  always_comb begin
    a_dig = '0;
    for (int j = 0; j < ND; j++)
      if (sel == IW'(j)) a_dig = a_pad[j*DW +: DW];
  end

  // Single-precision DW x DW multiplier (signed x unsigned when SIGNED_B).
  always_comb begin
    if (SIGNED_B) begin
      prod = (2*DW)'($signed({{DW{b[DW-1]}}, b}) * $signed({{DW{1'b0}}, a_dig}));
      prod_ext = PW'($signed(prod));
    end else begin
      prod = (2*DW)'({{DW{1'b0}}, b} * {{DW{1'b0}}, a_dig});
      prod_ext = PW'(prod);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p     <= '0;
      idx   <= '0;
      busy  <= 1'b0;
      valid <= 1'b0;
    end else if (start) begin
      p     <= prod_ext;
      idx   <= IW'(ND-2);
      busy  <= (ND > 1);
      valid <= (ND == 1);
    end else if (busy) begin
      p   <= (p << DW) + prod_ext;
      idx <= idx - 1'b1;
      if (idx == '0) begin
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end
  end

endmodule
