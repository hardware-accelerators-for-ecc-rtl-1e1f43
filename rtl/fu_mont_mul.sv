// fu_mont_mul: word-serial Montgomery multiplier over Fp with NB sub-blocks.
//
// Computes r = x * y * 2^(-w*nw) mod p for x, y in [0, p), p odd, nw the
// operand length in w-bit words. The schedule is the coarsely integrated
// operand scanning (CIOS) form of Montgomery multiplication: for every word
// y[i] the unit adds x * y[i] into an accumulator T (phase A), computes
// m = T[0] * pinv mod 2^w with pinv = -p^-1 mod 2^w (phase M), then adds m * p
// and shifts T down by one word (phase B). A final word-serial pass
// subtracts p when T >= p. Each of the NB sub-blocks is one w x w multiplier
// with its adder; in phases A and B the sub-blocks process NB consecutive
// words per cycle, carries rippling between them.
//
// Timing: start launches the operation on the loaded operands; busy stays high
// for nw * (2*ceil(nw/NB) + 3) + nw + 1 cycles; the result is then read
// combinationally at rd_idx.
//
// The Montgomery algorithm, the w-bit word width and the n_B w-bit sub-blocks
// follow the accelerator description; the CIOS schedule, the separate cycle
// for m and the pinv input supplied by the host are this design's choices.
module fu_mont_mul #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 8,
  parameter int unsigned NB = 1,
  localparam int unsigned IW = $clog2(NW + 1),
  localparam int unsigned W2 = 2 * W
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
  input  logic [W-1:0]          pinv,
  output logic                  busy,
  input  logic [IW-1:0]         rd_idx,
  output logic [W-1:0]          rd_word
);

  typedef enum logic [2:0] {S_IDLE, S_A, S_A_END, S_M, S_B, S_B_END, S_SUB, S_DONE} state_e;

  logic [NW-1:0][W-1:0] xw, yw, r_words, d_w;
  logic [NW+1:0][W-1:0] t_w;
  logic [IW-1:0] nw, i, j;
  logic [W-1:0]  carry, m;
  logic          borrow;
  logic          use_d;
  state_e        st;

  fu_operands #(.W(W), .NW(NW)) u_ops (
    .clk, .rst_n, .ld_en, .ld_idx, .ld_x, .ld_y, .ld_bypass,
    .r_words, .x_words(xw), .y_words(yw), .nw
  );

  // NB chained multiply-accumulate sub-blocks
  logic [NB-1:0][W-1:0] sb_sum;
  logic [W-1:0]         sb_carry_out;
  logic [W-1:0]         mul_by;
  always_comb begin
    logic [2*W-1:0] acc;
    logic [W-1:0]   c;
    int unsigned    jj;
    mul_by = (st == S_A) ? yw[i] : m;
    c      = carry;
    acc    = '0;
    sb_sum = '0;
    for (int b = 0; b < NB; b++) begin
      jj = 32'(j) + 32'(b);
      if (jj < 32'(nw)) begin
        acc = W2'(t_w[jj]) + W2'(c) +
              W2'((st == S_A) ? xw[jj] : modulus[jj]) * W2'(mul_by);
        sb_sum[b] = acc[W-1:0];
        c         = acc[2*W-1:W];
      end
    end
    sb_carry_out = c;
  end

  // final subtraction word
  logic [W:0] dsub;
  assign dsub = {1'b0, t_w[j]} - {1'b0, (j < IW'(NW)) ? modulus[j] : W'(0)} - W'(borrow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; i <= '0; j <= '0; carry <= '0; m <= '0; borrow <= 1'b0;
      use_d <= 1'b0; t_w <= '0; d_w <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_A; i <= '0; j <= '0; carry <= '0; t_w <= '0;
        end
        S_A: begin
          for (int b = 0; b < NB; b++)
            if (32'(j) + 32'(b) < 32'(nw)) t_w[32'(j) + 32'(b)] <= sb_sum[b];
          carry <= sb_carry_out;
          if (32'(j) + NB >= 32'(nw)) st <= S_A_END;
          else j <= j + IW'(NB);
        end
        S_A_END: begin
          {t_w[nw+1], t_w[nw]} <= {W'(0), t_w[nw]} + {W'(0), carry} + {t_w[nw+1], W'(0)};
          st <= S_M;
        end
        S_M: begin
          m <= W'(t_w[0] * pinv);
          j <= '0; carry <= '0;
          st <= S_B;
        end
        S_B: begin
          for (int b = 0; b < NB; b++)
            if (32'(j) + 32'(b) < 32'(nw) && 32'(j) + 32'(b) > 0)
              t_w[32'(j) + 32'(b) - 1] <= sb_sum[b];
          carry <= sb_carry_out;
          if (32'(j) + NB >= 32'(nw)) st <= S_B_END;
          else j <= j + IW'(NB);
        end
        S_B_END: begin
          {t_w[nw], t_w[nw-1]} <= {W'(0), t_w[nw]} + {W'(0), carry} + {t_w[nw+1], W'(0)};
          t_w[nw+1] <= '0;
          j <= '0; carry <= '0;
          if (i == nw - 1'b1) begin
            st <= S_SUB; borrow <= 1'b0;
          end else begin
            i <= i + 1'b1; st <= S_A;
          end
        end
        S_SUB: begin
          if (j < IW'(NW)) d_w[j] <= dsub[W-1:0];
          borrow <= dsub[W];
          if (j == nw - 1'b1) begin
            // T fits in nw words plus the top word t_w[nw]; T >= p unless the
            // subtraction borrowed with nothing above
            use_d <= (t_w[nw] != '0) | ~dsub[W];
            st <= S_DONE;
          end
          j <= j + 1'b1;
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  always_comb begin
    for (int k = 0; k < NW; k++) r_words[k] = use_d ? d_w[k] : t_w[k];
  end

  assign rd_word = r_words[rd_idx < IW'(NW) ? rd_idx : '0];

endmodule
