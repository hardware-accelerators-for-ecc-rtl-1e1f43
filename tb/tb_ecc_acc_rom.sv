// tb_ecc_acc_rom: the accelerator with its code memory built as a ROM
// (CODE_WRITABLE = 0), the program coming from tb/tb_ecc_acc_rom.hex at
// configuration time, as when the code is part of an FPGA bitstream.
//
// The ROM program computes r2 = r0 + r1 mod p on the adder/subtracter for
// 8-word elements. The testbench runs it, then overwrites every code address
// it uses with HALT through the host bus, which a ROM must ignore, and runs
// it again on new operands. Both sums are checked against wide-integer
// arithmetic, and the ROM contents are checked unchanged.
module tb_ecc_acc_rom;
  import ecc_pkg::*;
  localparam int W = 32;
  localparam logic [255:0] P256 = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] h_addr;
  logic h_we, h_re, h_rvalid, busy, done;
  logic [W-1:0] h_wdata, h_rdata;

  ecc_acc_top #(.CODE_WRITABLE(1'b0), .CODE_INIT_FILE("tb/tb_ecc_acc_rom.hex")) dut (
    .clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata, .h_rdata, .h_rvalid, .busy, .done);

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hw(logic [3:0] region, int off, logic [W-1:0] d);
    @(negedge clk); h_addr = {region, 12'(off)}; h_we = 1; h_re = 0; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic hr(logic [3:0] region, int off, output logic [W-1:0] d);
    @(negedge clk); h_addr = {region, 12'(off)}; h_re = 1; h_we = 0;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v % P256;
  endfunction

  task automatic run_sum(string what);
    logic [255:0] a, b, r;
    logic [W-1:0] d;
    int c;
    a = rnd(); b = rnd();
    for (int i = 0; i < 8; i++) begin
      hw(HREG_RF, i, a[i*32 +: 32]);
      hw(HREG_RF, 8 + i, b[i*32 +: 32]);
    end
    hw(HREG_CTRL, 0, 1);
    c = 0;
    while (!done && c < 1000) begin @(negedge clk); c++; end
    chk(done, {what, ": program reached HALT"});
    for (int i = 0; i < 8; i++) begin hr(HREG_RF, 16 + i, d); r[i*32 +: 32] = d; end
    chk(r == 256'((257'(a) + 257'(b)) % 257'(P256)), {what, ": r0 + r1 mod p"});
  endtask

  initial begin
    logic [31:0] rom0 [11];
    h_addr = 0; h_we = 0; h_re = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) hw(HREG_MOD, i, P256[i*32 +: 32]);
    for (int i = 0; i < 11; i++) rom0[i] = dut.u_code.mem[i];
    chk(rom0[0] == mk(OP_SETADDR0, 0, 0, 0, 0, 0), "ROM loaded at configuration");
    chk(rom0[10] == mk(OP_HALT), "ROM ends with HALT");
    run_sum("first run");
    for (int i = 0; i < 11; i++) hw(HREG_CODE, i, mk(OP_HALT));
    for (int i = 0; i < 11; i++) chk(dut.u_code.mem[i] == rom0[i], $sformatf("ROM word %0d unchanged", i));
    run_sum("second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
