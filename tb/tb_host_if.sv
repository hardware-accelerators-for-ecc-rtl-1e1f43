// tb_host_if: self-checking test of the basic host interface.
//
// Writes to every region of the address map and checks the resulting
// strobes on the private code and key paths, the register-file port (only
// while no program runs), the configuration registers and their read-back
// with one cycle of latency, the start strobe (ignored while running) and
// the status word. A behavioural one-cycle memory stands in for the register
// file.
module tb_host_if;
  import ecc_pkg::*;
  localparam int W = 32, NW = 8, CAW = 10, AW = 10, KIW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] h_addr;
  logic h_we, h_re, h_rvalid, start, running, done, code_we, kw_en, rf_we;
  logic [W-1:0] h_wdata, h_rdata, kw_data, rf_wdata, rf_rdata, pinv;
  logic [CAW-1:0] code_waddr;
  logic [31:0] code_wdata;
  logic [KIW-1:0] kw_idx;
  logic [AW-1:0] rf_addr;
  logic [NW-1:0][W-1:0] modulus;
  logic [2:0] lambda;
  logic [W-1:0] rfm [1024];

  host_if #(.W(W), .NW(NW), .CAW(CAW), .AW(AW)) dut (.*);

  always_ff @(posedge clk) begin
    if (rf_we) rfm[rf_addr] <= rf_wdata;
    rf_rdata <= rfm[rf_addr];
  end

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [3:0] reg_id, int off, logic [W-1:0] d);
    @(negedge clk); h_addr = {reg_id, 12'(off)}; h_we = 1; h_wdata = d; h_re = 0;
  endtask

  task automatic rd(logic [3:0] reg_id, int off, output logic [W-1:0] d);
    @(negedge clk); h_addr = {reg_id, 12'(off)}; h_we = 0; h_re = 1;
    @(negedge clk); h_re = 0;
    chk(h_rvalid, "rvalid");
    d = h_rdata;
  endtask

  initial begin
    logic [W-1:0] d, m [NW];
    h_addr = 0; h_we = 0; h_re = 0; h_wdata = 0; running = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // code path
    wr(HREG_CODE, 37, 32'hCAFE0001); #1;
    chk(code_we && code_waddr == 37 && code_wdata == 32'hCAFE0001 && !kw_en && !rf_we, "code write");
    // key path
    wr(HREG_KEY, 5, 32'h12345678); #1;
    chk(kw_en && kw_idx == 5 && kw_data == 32'h12345678 && !code_we, "key write");
    // modulus, pinv, lambda
    for (int i = 0; i < NW; i++) begin m[i] = $urandom; wr(HREG_MOD, i, m[i]); end
    wr(HREG_PINV, 0, 32'h0BADF00D);
    wr(HREG_LAMBDA, 0, 3);
    @(negedge clk); h_we = 0;
    for (int i = 0; i < NW; i++) chk(modulus[i] == m[i], "modulus word");
    chk(pinv == 32'h0BADF00D, "pinv");
    chk(lambda == 3, "lambda");
    rd(HREG_MOD, 6, d); chk(d == m[6], "modulus read-back");
    rd(HREG_PINV, 0, d); chk(d == 32'h0BADF00D, "pinv read-back");
    // register file while idle
    wr(HREG_RF, 100, 32'hA5A5A5A5); #1; chk(rf_we && rf_addr == 100, "rf write idle");
    @(negedge clk); h_we = 0;
    rd(HREG_RF, 100, d); chk(d == 32'hA5A5A5A5, "rf read-back");
    // start and status
    wr(HREG_CTRL, 0, 1); #1; chk(start, "start");
    running = 1;
    wr(HREG_CTRL, 0, 1); #1; chk(!start, "start ignored while running");
    wr(HREG_RF, 100, 32'h0); #1; chk(!rf_we, "rf blocked while running");
    @(negedge clk); h_we = 0;
    rd(HREG_STATUS, 0, d); chk(d == 32'b10, "status running");
    running = 0; done = 1;
    rd(HREG_STATUS, 0, d); chk(d == 32'b01, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
