// fu_f2m: binary-field (F2m, polynomial basis) adder, multiplier and
// inverter.
//
// Works on elements of F2m = F2[t]/(f(t)) stored, like prime-field elements,
// as runs of w-bit words (bit j of the element = coefficient of t^j). The
// reduction polynomial f, degree m <= W*NW - 1, is given on the modulus
// input; m is taken from its leading one at start. The LAUNCH MODE field
// selects the operation: mode[1] = 1 inversion r = x^-1 mod f (y ignored),
// else mode[0] = 1 multiplication r = x * y mod f, else addition r = x + y
// (bitwise XOR).
//
// Multiplication is bit-serial, most significant bit of y first: r <- r * t
// (reduced by f when the t^m coefficient appears), then r <- r + x when y's
// current bit is 1, one bit per cycle. A square is a multiplication with both
// operands equal. Inversion is the binary extended Euclidean algorithm over
// F2[t], one step per cycle: with u = x, v = f, g1 = 1, g2 = 0 (so that
// g1*x = u and g2*x = v mod f), divide whichever of u, v is even by t (and
// its g by t mod f), otherwise add the smaller of u, v (as an integer) to the
// larger and the matching g to the other, until u or v is 1; that one's g is
// the inverse. Inversion reuses the multiplier's registers: a holds u, b
// holds v and r holds g1.
//
// Timing: an addition leaves busy low and its result is readable from the
// cycle after start; a multiplication holds busy high for m cycles after
// start; an inversion for a data-dependent number of cycles, at most about
// 4m (up to about 600 for m = 233); the inverse of 0 is 0, at once. The
// result is read combinationally at rd_idx.
//
// The accelerator description lists F2m addition/subtraction,
// multiplication, squaring and inversion units in polynomial basis without
// their structure; the bit-serial and binary-Euclid algorithms, the shared
// unit with a MODE field and the full-width datapath are this design's own.
// Normal bases and the Montgomery, Mastrovito and two-step multipliers are
// not implemented.
module fu_f2m #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  localparam int unsigned IW = $clog2(NW + 1),
  localparam int unsigned M  = W * NW,
  localparam int unsigned MW = $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  logic [IW-1:0]         ld_idx,
  input  logic [W-1:0]          ld_x,
  input  logic [W-1:0]          ld_y,
  input  logic                  ld_bypass,
  input  logic                  start,
  input  logic [1:0]            mode,
  input  logic [NW-1:0][W-1:0]  modulus,
  output logic                  busy,
  input  logic [IW-1:0]         rd_idx,
  output logic [W-1:0]          rd_word
);

  logic [NW-1:0][W-1:0] xw, yw, r_words;
  logic [IW-1:0]        nw;
  logic [M-1:0]         f, a, b, r;
  logic [MW-1:0]        deg, bit_i;
  logic [M-1:0]         g2;
  logic                 inv;     // operation in progress is an inversion

  fu_operands #(.W(W), .NW(NW)) u_ops (
    .clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .r_words, .x_words(xw), .y_words(yw), .nw
  );

  assign f = modulus;

  // degree of f: position of its leading one
  always_comb begin
    deg = '0;
    for (int j = 0; j < M; j++) if (f[j]) deg = MW'(j);
  end

  // one multiplication step
  logic [M:0]   sh;
  logic [M-1:0] step;
  always_comb begin
    sh = {r, 1'b0};
    if (sh[int'(deg)]) sh = sh ^ {1'b0, f};
    step = sh[M-1:0] ^ (b[bit_i] ? a : '0);
  end

  // g / t mod f (f has a constant term, so g + f is divisible by t when g is not)
  function automatic logic [M-1:0] half_mod(logic [M-1:0] g, logic [M-1:0] fm);
    return g[0] ? ((g ^ fm) >> 1) : (g >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; a <= '0; b <= '0; r <= '0; bit_i <= '0; g2 <= '0; inv <= 1'b0;
    end else if (start) begin
      inv   <= mode[1];
      a     <= xw;
      g2    <= '0;
      bit_i <= '0;
      if (mode[1]) begin
        b    <= f;
        r    <= (xw == '0) ? '0 : M'(1);
        busy <= (xw != '0);
      end else begin
        b    <= yw;
        busy <= mode[0];
        r    <= mode[0] ? '0 : (xw ^ yw);
        if (mode[0]) bit_i <= deg - 1'b1;
      end
    end else if (busy && !inv) begin
      r <= step;
      if (bit_i == '0) busy <= 1'b0;
      else bit_i <= bit_i - 1'b1;
    end else if (busy) begin
      if (a == M'(1)) begin
        busy <= 1'b0;
      end else if (b == M'(1)) begin
        r    <= g2;
        busy <= 1'b0;
      end else if (!a[0]) begin
        a <= a >> 1;
        r <= half_mod(r, f);
      end else if (!b[0]) begin
        b  <= b >> 1;
        g2 <= half_mod(g2, f);
      end else if (a >= b) begin
        a <= a ^ b;
        r <= r ^ g2;
      end else begin
        b  <= b ^ a;
        g2 <= g2 ^ r;
      end
    end
  end

  assign r_words = r;
  assign rd_word = r_words[rd_idx < IW'(NW) ? rd_idx : '0];

endmodule
