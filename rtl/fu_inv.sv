// fu_inv: modular inversion unit over Fp (binary extended Euclidean algorithm).
//
// Computes r = x^-1 mod p for x in [1, p), p an odd prime; x = 0 gives r = 0.
// The operand is loaded word by word like any unit operand (y is ignored);
// start launches the computation. The unit keeps u, v, x1, x2 as full-width
// registers and performs one step of the binary algorithm per cycle: halve
// whichever of u, v is even (halving x1 or x2 modulo p alongside), otherwise
// subtract the smaller of u, v from the larger (and x2 from x1, or x1 from x2,
// modulo p). It stops when u or v reaches 1. busy stays high for at most about
// 4 * log2(p) + 2 cycles (about 520 to 550 for a 256-bit p); the result is then
// read word by word at rd_idx.
//
// The accelerator description lists an Fp inversion unit but gives no
// algorithm; the binary Euclidean algorithm and the full-width datapath are
// this design's choices. The result is the plain inverse, not a Montgomery
// form.
module fu_inv #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  localparam int unsigned IW = $clog2(NW + 1),
  localparam int unsigned M  = W * NW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  logic [IW-1:0]         ld_idx,
  input  logic [W-1:0]          ld_x,
  input  logic [W-1:0]          ld_y,
  input  logic                  ld_bypass,
  input  logic                  start,
  input  logic [NW-1:0][W-1:0]  modulus,
  output logic                  busy,
  input  logic [IW-1:0]         rd_idx,
  output logic [W-1:0]          rd_word
);

  logic [NW-1:0][W-1:0] xw, yw, r_words;
  logic [IW-1:0]        nw;
  logic [M-1:0]         u, v, x1, x2, p;

  fu_operands #(.W(W), .NW(NW)) u_ops (
    .clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .r_words, .x_words(xw), .y_words(yw), .nw
  );

  assign p = modulus;

  // x / 2 mod p for x in [0, p)
  function automatic logic [M-1:0] half_mod(logic [M-1:0] a, logic [M-1:0] pm);
    logic [M:0] s;
    s = a[0] ? ({1'b0, a} + {1'b0, pm}) : {1'b0, a};
    return s[M:1];
  endfunction

  // a - b mod p for a, b in [0, p)
  function automatic logic [M-1:0] sub_mod(logic [M-1:0] a, logic [M-1:0] b, logic [M-1:0] pm);
    logic [M:0] d;
    d = {1'b0, a} - {1'b0, b};
    return d[M] ? (d[M-1:0] + pm) : d[M-1:0];
  endfunction

  logic finished;
  assign finished = (u == M'(1)) || (v == M'(1)) || (u == '0) || (v == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; u <= '0; v <= '0; x1 <= '0; x2 <= '0; r_words <= '0;
    end else if (start) begin
      busy <= 1'b1;
      u <= xw; v <= p; x1 <= M'(1); x2 <= '0;
    end else if (busy) begin
      if (finished) begin
        busy    <= 1'b0;
        r_words <= (u == M'(1)) ? x1 : (v == M'(1)) ? x2 : '0;
      end else if (!u[0]) begin
        u  <= u >> 1;
        x1 <= half_mod(x1, p);
      end else if (!v[0]) begin
        v  <= v >> 1;
        x2 <= half_mod(x2, p);
      end else if (u >= v) begin
        u  <= u - v;
        x1 <= sub_mod(x1, x2, p);
      end else begin
        v  <= v - u;
        x2 <= sub_mod(x2, x1, p);
      end
    end
  end

  assign rd_word = r_words[rd_idx < IW'(NW) ? rd_idx : '0];

endmodule
