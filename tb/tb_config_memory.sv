// tb_config_memory: self-checking test of the write-only configuration memory.
// After reset every bit must be 0 (un-programmed). Random writes, some to
// addresses beyond the last word, are mirrored in a reference array; the
// whole image is compared after every write, and each write must be visible
// right after its clock edge.
module tb_config_memory;
  localparam int WORDS = 5, WW = 8, AW = 3;
  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [WW-1:0] wdata = '0;
  logic [WORDS*WW-1:0] image;
  logic [WORDS-1:0][WW-1:0] ref_mem;
  int checks = 0, failures = 0;

  config_memory #(.CFG_WORDS(WORDS), .CFG_WORD_W(WW), .CFG_AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata), .image(image));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: image=%h ref=%h", what, $time, image, ref_mem);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ignored = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ref_mem = '0;
    check(image == '0, "un-programmed after reset");
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom_range(0, 3) != 0);
      addr  = AW'($urandom);
      wdata = WW'($urandom);
      @(negedge clk);
      if (we && addr < WORDS) ref_mem[addr] = wdata;
      else if (we) ignored++;
      check(image == ref_mem, "image after write");
    end
    we = 0;
    check(ignored > 0, "out-of-range writes exercised");
    rst_n = 0;
    #1;
    check(image == '0, "reset erases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
