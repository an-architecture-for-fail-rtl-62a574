// tb_plb_lut3: self-checking test of the 3-input LUT.
// Sweeps every input combination for 64 random truth tables plus the
// identity and constant tables, and checks y against the truth-table bit
// picked out by shifting. Also checks that the identity table copies i[0]
// whatever i[2:1] carry.
module tb_plb_lut3;
  logic [7:0] init;
  logic [2:0] i;
  logic       y;
  int checks = 0, failures = 0;

  plb_lut3 dut (.init(init), .i(i), .y(y));

  task automatic check(logic exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: init=%h i=%b y=%b exp=%b", what, init, i, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 67; t++) begin
      init = (t == 64) ? 8'hAA : (t == 65) ? 8'h00 : (t == 66) ? 8'hFF : 8'($urandom);
      for (int v = 0; v < 8; v++) begin
        i = 3'(v);
        #1;
        check(1'((init >> v) & 8'h1), "table");
        if (init == 8'hAA) check(i[0], "identity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
