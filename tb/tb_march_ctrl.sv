// tb_march_ctrl: checks the operation sequence of the Modified March C-
// controller. The testbench plays the address generator itself (a counter
// that obeys ag_load/ag_step/ag_dir) and compares, cycle by cycle, every
// operation the controller issues with the algorithm written out here as a
// table: element, address order, read or write, and the M1 data value. It
// also checks the test length (8 operations per subgroup word, no idle cycle
// between elements), the drain cycle, `done` holding while `en` is high and a
// second run on a 4-word subgroup.
module tb_march_ctrl;
  import march_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic       ag_load, ag_step, ag_last;
  dir_e       ag_dir;
  logic       op_valid, op_val;
  op_kind_e   op_wr;
  logic [2:0] elem;
  logic       busy, done;

  // address generator played by the testbench
  int   words = 128;
  int   m_addr = 0;
  logic m_down = 1'b0;

  march_ctrl dut (
    .clk(clk), .rst_n(rst_n), .en(en),
    .ag_load(ag_load), .ag_step(ag_step), .ag_dir(ag_dir), .ag_last(ag_last),
    .op_valid(op_valid), .op_wr(op_wr), .op_val(op_val), .elem(elem),
    .busy(busy), .done(done)
  );

  always #5 clk = ~clk;

  assign ag_last = m_down ? (m_addr == 0) : (m_addr == words - 1);

  always @(posedge clk) begin
    if (ag_load) begin
      m_down <= (ag_dir == DIR_DOWN);
      m_addr <= (ag_dir == DIR_DOWN) ? words - 1 : 0;
    end else if (ag_step) begin
      m_addr <= m_down ? m_addr - 1 : m_addr + 1;
    end
  end

  // The algorithm, subgroup M1 view:
  // up(w0); up(r0,w1); up(r1); down(w0); down(r0,w1); down(r1)
  localparam int   N_OPS [6]    = '{1, 2, 1, 1, 2, 1};
  localparam bit   DOWN  [6]    = '{0, 0, 0, 1, 1, 1};
  localparam bit   IS_WR [6][2] = '{'{1, 0}, '{0, 1}, '{0, 0}, '{1, 0}, '{0, 1}, '{0, 0}};
  localparam bit   VAL   [6][2] = '{'{0, 0}, '{0, 1}, '{1, 0}, '{0, 0}, '{0, 1}, '{1, 0}};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one complete test and compare each cycle with the table.
  task automatic run_test();
    int a, n_cyc, mism;
    mism = 0;
    n_cyc = 0;
    en = 1'b1;
    @(posedge clk);              // this edge samples en
    for (int e = 0; e < 6; e++) begin
      for (int k = 0; k < words; k++) begin
        a = DOWN[e] ? words - 1 - k : k;
        for (int o = 0; o < N_OPS[e]; o++) begin
          @(negedge clk);
          n_cyc++;
          checks++;
          if (!op_valid || busy !== 1'b1 || done !== 1'b0 || int'(elem) != e || m_addr != a
              || (op_wr == OP_WRITE) != IS_WR[e][o] || op_val != VAL[e][o]) begin
            failures++;
            if (mism++ < 5)
              $display("FAIL op: elem %0d addr %0d wr %0d val %0d, expected elem %0d addr %0d wr %0d val %0d",
                       elem, m_addr, op_wr, op_val, e, a, IS_WR[e][o], VAL[e][o]);
          end
        end
      end
    end
    check(n_cyc == 8 * words, "operation count is 8 per subgroup word");
    @(negedge clk);
    check(!op_valid && busy && !done, "drain cycle after the last operation");
    @(negedge clk);
    check(!op_valid && !busy && done, "done after the drain cycle");
    repeat (5) @(negedge clk);
    check(done && !op_valid, "done holds while en is high");
    en = 1'b0;
    @(negedge clk);
    check(!done && !busy && !op_valid, "back to idle when en falls");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!op_valid && !busy && !done, "idle after reset");
    run_test();
    // the controller takes the subgroup size from ag_last alone
    words = 4;
    repeat (3) @(negedge clk);
    run_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
