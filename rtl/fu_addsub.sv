// fu_addsub: word-serial modular adder/subtracter over Fp.
//
// After its operands x and y have been loaded (see fu_operands) a start pulse
// launches r = x + y mod p (sub = 0) or r = x - y mod p (sub = 1), with x, y in
// [0, p). One w-bit word is processed per cycle, least significant first, with
// two carry chains running side by side: s = x +/- y and t = s -/+ p. After the
// last word the unit picks t when the sum overflowed p (addition) or the
// difference went negative (subtraction), else s. busy is high for nw cycles
// after start; the result words are then read at rd_idx combinationally.
//
// The unit's role (Fp addition/subtraction on w-bit words x[i], y[i], r[i]
// with a few control bits) follows the accelerator description; the two-chain
// word-serial algorithm is this design's own.
module fu_addsub #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  localparam int unsigned IW = $clog2(NW + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  logic [IW-1:0]         ld_idx,
  input  logic [W-1:0]          ld_x,
  input  logic [W-1:0]          ld_y,
  input  logic                  ld_bypass,
  input  logic                  start,
  input  logic                  sub,
  input  logic [NW-1:0][W-1:0]  modulus,
  output logic                  busy,
  input  logic [IW-1:0]         rd_idx,
  output logic [W-1:0]          rd_word
);

  logic [NW-1:0][W-1:0] xw, yw, s_w, t_w, r_words;
  logic [IW-1:0] nw, i;
  logic c1, c2, is_sub, use_t;

  fu_operands #(.W(W), .NW(NW)) u_ops (
    .clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .r_words, .x_words(xw), .y_words(yw), .nw
  );

  // one word of each chain
  logic [W:0] s_sum, t_sum;
  always_comb begin
    if (!is_sub) s_sum = {1'b0, xw[i]} + {1'b0, yw[i]} + W'(c1);
    else         s_sum = {1'b0, xw[i]} - {1'b0, yw[i]} - W'(c1);
    if (!is_sub) t_sum = {1'b0, s_sum[W-1:0]} - {1'b0, modulus[i]} - W'(c2);
    else         t_sum = {1'b0, s_sum[W-1:0]} + {1'b0, modulus[i]} + W'(c2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; i <= '0; c1 <= 1'b0; c2 <= 1'b0; is_sub <= 1'b0; use_t <= 1'b0;
      s_w <= '0; t_w <= '0;
    end else if (start) begin
      busy <= 1'b1; i <= '0; c1 <= 1'b0; c2 <= 1'b0; is_sub <= sub;
      s_w <= '0; t_w <= '0;
    end else if (busy) begin
      s_w[i] <= s_sum[W-1:0];
      t_w[i] <= t_sum[W-1:0];
      c1 <= s_sum[W];
      c2 <= t_sum[W];
      i  <= i + 1'b1;
      if (i == nw - 1'b1) begin
        busy <= 1'b0;
        // addition: s >= p when the sum carried out or s - p did not borrow
        // subtraction: x - y borrowed, so the corrected value t is the answer
        use_t <= is_sub ? s_sum[W] : (s_sum[W] | ~t_sum[W]);
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NW; k++) r_words[k] = use_t ? t_w[k] : s_w[k];
  end

  assign rd_word = r_words[rd_idx < IW'(NW) ? rd_idx : '0];

endmodule
