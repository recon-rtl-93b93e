// recon_divider -- signed fixed-point divider of the activation back end.
//
// q = num / den for WIDTH-bit two's complement operands with FRAC fractional
// bits; the quotient has the same format. The design builds its divider from
// subtraction and shift only; this one is a combinational restoring divider
// on the magnitudes: the dividend |num| * 2^FRAC is shifted in one bit at a
// time, den is subtracted whenever the partial remainder allows it, and each
// comparison yields one quotient bit. The sign is applied at the end
// (truncation toward zero). A quotient beyond the word, or den = 0,
// saturates to the largest magnitude of the quotient's sign.
module recon_divider #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned FRAC  = 5
) (
  input  logic [WIDTH-1:0] num,
  input  logic [WIDTH-1:0] den,
  output logic [WIDTH-1:0] q
);

  localparam int unsigned DW = WIDTH + FRAC;   // dividend width

  logic             neg;
  logic [WIDTH-1:0] an, ad;
  logic [DW-1:0]    dividend, quo;
  logic [WIDTH:0]   rem;
  logic [WIDTH:0]   trial;
  logic             ovf;

  always_comb begin
    neg      = num[WIDTH-1] ^ den[WIDTH-1];
    an       = num[WIDTH-1] ? (~num + 1'b1) : num;
    ad       = den[WIDTH-1] ? (~den + 1'b1) : den;
    dividend = DW'(an) << FRAC;
    rem      = '0;
    quo      = '0;
    for (int b = DW - 1; b >= 0; b--) begin
      rem   = {rem[WIDTH-1:0], dividend[b]};
      trial = rem - {1'b0, ad};
      if (!trial[WIDTH]) begin
        rem    = trial;
        quo[b] = 1'b1;
      end
    end
    ovf = (ad == '0) || (quo > DW'((1 << (WIDTH - 1)) - 1));
    if (ovf) q = neg ? {1'b1, {(WIDTH-1){1'b0}}} + 1'b1 : {1'b0, {(WIDTH-1){1'b1}}};
    else     q = neg ? WIDTH'(~quo + 1'b1) : WIDTH'(quo);
  end

endmodule
