// tb_addr_gen: drives the address generator with complete ascending and
// descending sweeps and with random load/step traffic, and compares address
// and `last` each cycle with a counter kept in the testbench.
module tb_addr_gen;
  import march_pkg::*;

  localparam int unsigned AW = 7;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          load = 1'b0, step = 1'b0;
  dir_e          dir = DIR_UP;
  logic [AW-1:0] addr;
  logic          last;

  int            m_addr;
  logic          m_down;

  addr_gen #(.AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .dir(dir), .step(step),
    .addr(addr), .last(last)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic l, input logic s, input logic d);
    load <= l;
    step <= s;
    dir  <= d ? DIR_DOWN : DIR_UP;
    @(posedge clk);
    if (l) begin
      m_down = d;
      m_addr = d ? (1 << AW) - 1 : 0;
    end else if (s) begin
      m_addr = m_down ? (m_addr + (1 << AW) - 1) % (1 << AW) : (m_addr + 1) % (1 << AW);
    end
    #1;
    checks++;
    if (int'(addr) != m_addr || last !== (m_down ? (m_addr == 0) : (m_addr == (1 << AW) - 1))) begin
      failures++;
      $display("FAIL addr %0d last %b, expected %0d (down=%b)", addr, last, m_addr, m_down);
    end
  endtask

  int n_last;

  initial begin
    m_addr = 0;
    m_down = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // full ascending sweep: last seen exactly once, at the final address
    cycle(1'b1, 1'b0, 1'b0);
    n_last = 0;
    for (int i = 0; i < (1 << AW) - 1; i++) begin
      if (last) n_last++;
      cycle(1'b0, 1'b1, 1'b0);
    end
    checks++;
    if (n_last != 0 || !last || addr != '1) begin
      failures++;
      $display("FAIL ascending sweep ended at %0d last=%b", addr, last);
    end
    // full descending sweep
    cycle(1'b1, 1'b0, 1'b1);
    for (int i = 0; i < (1 << AW) - 1; i++) cycle(1'b0, 1'b1, 1'b1);
    checks++;
    if (!last || addr != '0) begin
      failures++;
      $display("FAIL descending sweep ended at %0d last=%b", addr, last);
    end
    // random traffic; dir only matters on load
    for (int i = 0; i < 3000; i++) begin
      cycle(($urandom % 16) == 0, $urandom % 2, $urandom % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
