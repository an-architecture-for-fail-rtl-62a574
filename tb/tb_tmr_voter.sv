// tb_tmr_voter: self-checking test of the 2-of-3 majority voter.
// Random 4-bit module outputs, most of them with one module corrupted.
// Each output bit is checked against a count of ones among the three inputs,
// and the outvoted flags against a per-module comparison with that majority.
module tb_tmr_voter;
  localparam int W = 4;
  logic [W-1:0] a, b, c, y, dis;
  logic [2:0] ov;
  int checks = 0, failures = 0;

  tmr_voter #(.WIDTH(W)) dut (.a(a), .b(b), .c(c), .y(y), .disagree(dis), .outvoted(ov));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b y=%b dis=%b ov=%b", what, a, b, c, y, dis, ov);
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
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] good, exp;
      good = W'($urandom);
      a = good; b = good; c = good;
      case ($urandom_range(0, 4))
        0: a = W'($urandom);
        1: b = W'($urandom);
        2: c = W'($urandom);
        3: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
        default: ;
      endcase
      #1;
      for (int k = 0; k < W; k++) begin
        int ones;
        ones = int'(a[k]) + int'(b[k]) + int'(c[k]);
        exp[k] = (ones >= 2);
        check(dis[k] == (ones == 1 || ones == 2), "disagree bit");
      end
      check(y == exp, "majority");
      check(ov[0] == (a != exp) && ov[1] == (b != exp) && ov[2] == (c != exp), "outvoted");
      if (a == good || b == good || c == good) begin
        // one corrupted module never changes the result
        if ((a == good) + (b == good) + (c == good) >= 2) check(y == good, "single fault masked");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
