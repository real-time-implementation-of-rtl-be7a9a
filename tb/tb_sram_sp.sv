// tb_sram_sp: self-checking test of the single-port synchronous SRAM.
// Fills a 4096-word memory of 25-bit words with random data,
// reads them back in random order and checks the one-cycle read latency,
// that rdata holds between reads, that a write leaves rdata alone, and that
// a disabled cycle neither writes nor reads.
`timescale 1ns/1ps
module tb_sram_sp;
  localparam int DEPTH = 4096, WIDTH = 25;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en = 1'b0, we = 1'b0;
  logic [11:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin : main
    logic [WIDTH-1:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      en <= 1'b1; we <= 1'b1; addr <= 12'(a);
      wdata <= WIDTH'($urandom());
      #1 model[a] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = 12'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read %0d", a));
      // a write does not disturb rdata
      held = rdata;
      en = 1'b1; we = 1'b1; addr = 12'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom()); model[addr] = wdata;
      @(negedge clk);
      check(rdata == held, "rdata held across a write");
      // a disabled cycle does nothing
      en = 1'b0; we = 1'b1; wdata = ~wdata;
      @(negedge clk);
      check(rdata == held, "rdata held while disabled");
    end
    for (int a = 0; a < DEPTH; a += 97) begin
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = 12'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
