// Testbench of sobel_regs: register write/read-back, the size register,
// START producing one start pulse only while idle, the CTRL busy bit, the
// DONE flag set by a done pulse and cleared by writing 1, and irq following
// DONE and IRQ_EN.
module tb_sobel_regs;
  import edsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel = 0, we = 0;
  logic [REG_AW-1:0] addr = 0;
  data_t wdata = 0, rdata;
  logic start, busy = 0, done = 0, irq;
  addr_t src_base, dst_base;
  int checks = 0, failures = 0;
  int starts = 0;

  sobel_regs #(.IMG_W(640), .IMG_H(480)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

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
    rd_check(SOBEL_CTRL, 0, "ctrl after reset");
    rd_check(SOBEL_STATUS, 0, "status after reset");
    wr(SOBEL_SRC, 32'h0001_0000);
    wr(SOBEL_DST, 32'h0005_0000);
    rd_check(SOBEL_SRC, 32'h0001_0000, "src");
    rd_check(SOBEL_DST, 32'h0005_0000, "dst");
    check(src_base == 32'h0001_0000 && dst_base == 32'h0005_0000, "base outputs");
    rd_check(SOBEL_SIZE, {16'd480, 16'd640}, "size");
    // start while idle
    wr(SOBEL_CTRL, 32'h3);
    check(starts == 1, "one start pulse");
    busy = 1;
    rd_check(SOBEL_CTRL, 32'h3, "ctrl while busy");
    rd_check(SOBEL_STATUS, 32'h2, "status busy");
    wr(SOBEL_CTRL, 32'h3);          // ignored while busy
    check(starts == 1, "no start while busy");
    check(!irq, "no irq before done");
    @(negedge clk); busy = 0; done = 1; @(negedge clk); done = 0;
    rd_check(SOBEL_STATUS, 32'h1, "done flag");
    check(irq, "irq with done and enable");
    wr(SOBEL_CTRL, 32'h0);          // disable interrupt, no start
    check(!irq && starts == 1, "irq masked, no start on 0");
    rd_check(SOBEL_STATUS, 32'h1, "done stays");
    wr(SOBEL_STATUS, 32'h1);
    rd_check(SOBEL_STATUS, 32'h0, "done cleared by write 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
