// tb_pattern_gen: checks that the test sequence generator drives a solid
// background word to M1 and exactly its complement to M2, for both data
// values and for a non-default word width.
module tb_pattern_gen;

  int checks = 0;
  int failures = 0;

  logic       val;
  logic [7:0] d_m1, d_m2;
  logic [4:0] n_m1, n_m2;

  pattern_gen dut (.val(val), .d_m1(d_m1), .d_m2(d_m2));
  pattern_gen #(.DW(5)) dut5 (.val(val), .d_m1(n_m1), .d_m2(n_m2));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    val = 1'b0;
    #1;
    check(32'(d_m1), 32'h00, "M1 word for 0");
    check(32'(d_m2), 32'hFF, "M2 word for 0");
    check(32'(n_m1), 32'h00, "M1 5-bit word for 0");
    check(32'(n_m2), 32'h1F, "M2 5-bit word for 0");
    val = 1'b1;
    #1;
    check(32'(d_m1), 32'hFF, "M1 word for 1");
    check(32'(d_m2), 32'h00, "M2 word for 1");
    check(32'(n_m1), 32'h1F, "M1 5-bit word for 1");
    check(32'(n_m2), 32'h00, "M2 5-bit word for 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
