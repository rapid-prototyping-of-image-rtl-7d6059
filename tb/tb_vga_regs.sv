// Testbench of vga_regs: enable and frame-base write/read-back and outputs,
// the displaying status bit, and the sticky underflow flag with its
// write-1-to-clear.
module tb_vga_regs;
  import edsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel = 0, we = 0;
  logic [REG_AW-1:0] addr = 0;
  data_t wdata = 0, rdata;
  logic enable, underflow = 0, displaying = 0;
  addr_t fb_base;
  int checks = 0, failures = 0;

  vga_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [REG_AW-1:0] a, data_t d);
    @(negedge clk); sel = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic rd_check(logic [REG_AW-1:0] a, data_t exp, string what);
    @(negedge clk); sel = 1; we = 0; addr = a;
    #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: got %h want %h", what, rdata, exp); end
    @(negedge clk); sel = 0;
  endtask

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd_check(VGA_CTRL, 0, "ctrl after reset");
    check(!enable, "disabled after reset");
    wr(VGA_FB, 32'h0004_B000);
    wr(VGA_CTRL, 32'h1);
    check(enable && fb_base == 32'h0004_B000, "enable and base outputs");
    rd_check(VGA_CTRL, 32'h1, "ctrl");
    rd_check(VGA_FB, 32'h0004_B000, "fb");
    displaying = 1;
    rd_check(VGA_STATUS, 32'h2, "displaying");
    @(negedge clk); underflow = 1; @(negedge clk); underflow = 0;
    rd_check(VGA_STATUS, 32'h3, "underflow sticky");
    wr(VGA_STATUS, 32'h1);
    rd_check(VGA_STATUS, 32'h2, "underflow cleared");
    wr(VGA_CTRL, 32'h0);
    check(!enable, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
