// key_mgmt: key management unit with on-the-fly recoding of the scalar k.
//
// The scalar k reaches this unit only through its private write port (kw_*),
// never through the register file or the functional units. load (the WRITEK
// instruction) copies the low load_nw words of the stored key into the
// recoding register; from then on the unit presents one recoded digit k_i at
// a time, least significant first, and next advances to the following digit.
// Recoding is done on the fly with the width-lambda non-adjacent form: when
// the remaining value is odd the digit is its signed residue modulo 2^lambda
// (an odd number in (-2^(lambda-1), 2^(lambda-1))), otherwise 0; the value
// then becomes (value - digit) / 2. lambda = 1 gives plain binary digits,
// lambda = 2 the NAF, lambda = 3..5 the windowed NAFs. done is high once the
// remaining value is 0.
//
// Timing: digit and done are combinational from the recoding register; load
// and next take effect at the next clock edge, one digit per next pulse.
//
// The private key path, the unit's split into key storage, a small control
// and a recoding block, and the recodings (binary, lambda-NAF with
// lambda in {2, 3, 4, 5}) follow the accelerator description; the digit order
// (right to left), the signed 8-bit digit encoding and the load/next
// handshake are this design's choices. Double-base, multiple-base,
// addition-chain and randomized recodings are not implemented.
module key_mgmt #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  localparam int unsigned IW = $clog2(NW + 1),
  localparam int unsigned KIW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned M  = W * NW
) (
  input  logic              clk,
  input  logic              rst_n,
  // private key download path
  input  logic              kw_en,
  input  logic [KIW-1:0]    kw_idx,
  input  logic [W-1:0]      kw_data,
  // recoding configuration: window width lambda, 1..5
  input  logic [2:0]        lambda,
  // control from the instruction controller
  input  logic              load,
  input  logic [IW-1:0]     load_nw,
  input  logic              next,
  output logic signed [7:0] digit,
  output logic              done
);

  logic [NW-1:0][W-1:0] kbuf;      // key storage
  logic [M:0]           kr;        // remaining value being recoded
  logic [2:0]           lam;

  assign lam = (lambda == 3'd0) ? 3'd1 : (lambda > 3'd5) ? 3'd5 : lambda;

  // recoding block: current digit
  always_comb begin
    logic [5:0] res;
    logic [5:0] mask;
    mask  = 6'((7'd1 << lam) - 7'd1);
    res   = kr[5:0] & mask;
    digit = '0;
    if (kr[0]) begin
      if (lam == 3'd1)                       digit = 8'sd1;
      else if (res[lam-1])                   digit = 8'(signed'({2'b00, res}) - (8'sd1 <<< lam));
      else                                   digit = 8'({2'b00, res});
    end
  end

  assign done = (kr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kbuf <= '0;
      kr   <= '0;
    end else begin
      if (kw_en) kbuf[kw_idx] <= kw_data;
      if (load) begin
        for (int k = 0; k < NW; k++)
          kr[k*W +: W] <= (k < int'(load_nw)) ? kbuf[k] : '0;
        kr[M] <= 1'b0;
      end else if (next && !done) begin
        kr <= (kr - {{(M+1-8){digit[7]}}, digit}) >> 1;
      end
    end
  end

endmodule
