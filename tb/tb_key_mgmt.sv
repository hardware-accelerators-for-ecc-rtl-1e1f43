// tb_key_mgmt: self-checking test of the key unit and its on-the-fly recoding.
//
// Random 256-bit and 128-bit keys are written over the private path and
// recoded with lambda = 1 (binary) and lambda = 2..5 (width-lambda NAF). The
// digit stream is checked against the defining properties of the recoding,
// not against a second implementation: sum(d_i * 2^i) = k, every non-zero
// digit is odd with |d_i| < 2^(lambda-1) (binary: d_i in {0, 1}), every
// non-zero digit is followed by at least lambda - 1 zeros, and the stream
// ends (done) after at most 257 digits.
module tb_key_mgmt;
  localparam int W = 32, NW = 8, IW = $clog2(NW + 1), KIW = $clog2(NW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic kw_en, load, next, done;
  logic [KIW-1:0] kw_idx;
  logic [W-1:0] kw_data;
  logic [2:0] lambda;
  logic [IW-1:0] load_nw;
  logic signed [7:0] digit;

  key_mgmt #(.W(W), .NW(NW)) dut (.clk, .rst_n, .kw_en, .kw_idx, .kw_data, .lambda,
    .load, .load_nw, .next, .digit, .done);

  int checks = 0, failures = 0;

  task automatic recode(logic [255:0] k, int nw, int lam);
    logic signed [300:0] acc, pw;
    int n, zeros_needed, bad;
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); kw_en = 1; kw_idx = KIW'(i); kw_data = k[i*32 +: 32];
    end
    @(negedge clk); kw_en = 0; lambda = 3'(lam); load = 1; load_nw = IW'(nw);
    @(negedge clk); load = 0;
    if (nw < 8) k = k & ((256'd1 << (32 * nw)) - 1);
    acc = 0; pw = 1; n = 0; zeros_needed = 0; bad = 0;
    while (!done && n < 300) begin
      if (digit != 0) begin
        if (zeros_needed > 0) bad++;
        if (lam == 1) begin
          if (digit != 1) bad++;
        end else begin
          if (digit % 2 == 0) bad++;
          if (digit >= (1 << (lam - 1)) || digit <= -(1 << (lam - 1))) bad++;
        end
        zeros_needed = lam - 1;
      end else if (zeros_needed > 0) begin
        zeros_needed--;
      end
      acc = acc + pw * 301'(signed'(digit));
      pw = pw <<< 1;
      n++;
      next = 1; @(negedge clk); next = 0;
    end
    checks += 3;
    if (acc != 301'(k)) begin failures++; $display("FAIL lambda=%0d sum of digits differs", lam); end
    if (bad != 0) begin failures++; $display("FAIL lambda=%0d %0d digit rule violations", lam, bad); end
    if (n > 32 * nw + 1) begin failures++; $display("FAIL lambda=%0d %0d digits", lam, n); end
  endtask

  initial begin
    logic [255:0] k;
    kw_en = 0; load = 0; next = 0; kw_idx = 0; kw_data = 0; lambda = 1; load_nw = 8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 8; i++) k[i*32 +: 32] = $urandom;
      if (t == 0) k = '1;
      for (int lam = 1; lam <= 5; lam++) begin
        recode(k, 8, lam);
        recode(k, 4, lam);
      end
    end
    // a zero key is done at once
    recode('0, 8, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
