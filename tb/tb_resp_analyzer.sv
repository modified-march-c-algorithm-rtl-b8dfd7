// tb_resp_analyzer: drives the response analyzer with random reads of both
// subgroups, answers each one a cycle later with the expected words or with
// words that have random bits flipped, and checks the sticky fail flags, the
// error and read counts and the record of the first failing word against a
// model kept in the testbench. It also checks that `clear` starts afresh.
module tb_resp_analyzer;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clear = 1'b0;
  logic        rd_issue = 1'b0;
  logic [6:0]  rd_addr = '0;
  logic [2:0]  rd_elem = '0;
  logic [7:0]  exp_m1 = '0, exp_m2 = '0, dout_m1 = '0, dout_m2 = '0;
  logic        fail, fail_m1, fail_m2;
  logic [15:0] err_count, rd_count;
  logic [7:0]  first_addr, first_syndrome;
  logic [2:0]  first_elem;

  resp_analyzer dut (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .rd_issue(rd_issue), .rd_addr(rd_addr), .rd_elem(rd_elem),
    .exp_m1(exp_m1), .exp_m2(exp_m2), .dout_m1(dout_m1), .dout_m2(dout_m2),
    .fail(fail), .fail_m1(fail_m1), .fail_m2(fail_m2),
    .err_count(err_count), .rd_count(rd_count),
    .first_addr(first_addr), .first_elem(first_elem), .first_syndrome(first_syndrome)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  bit       m_f1, m_f2;
  int       m_err, m_rd;
  bit [7:0] m_first_addr, m_first_syn;
  bit [2:0] m_first_elem;

  task automatic model_clear();
    m_f1 = 0; m_f2 = 0; m_err = 0; m_rd = 0;
    m_first_addr = 0; m_first_syn = 0; m_first_elem = 0;
  endtask

  task automatic compare(input string what);
    checks++;
    if (fail_m1 !== m_f1 || fail_m2 !== m_f2 || fail !== (m_f1 | m_f2) ||
        int'(err_count) != m_err || int'(rd_count) != m_rd ||
        first_addr !== m_first_addr || first_elem !== m_first_elem ||
        first_syndrome !== m_first_syn) begin
      failures++;
      $display("FAIL %s at %0t: f1 %b/%b f2 %b/%b err %0d/%0d rd %0d/%0d first %h/%h elem %0d/%0d syn %h/%h",
               what, $time, fail_m1, m_f1, fail_m2, m_f2, err_count, m_err, rd_count, m_rd,
               first_addr, m_first_addr, first_elem, m_first_elem, first_syndrome, m_first_syn);
    end
  endtask

  // One run of random traffic. err_rate: one in err_rate reads is corrupted.
  task automatic run(input int n, input int err_rate);
    bit       p_valid;
    bit [6:0] p_addr;
    bit [2:0] p_elem;
    bit [7:0] p_e1, p_e2, x1, x2;
    p_valid = 0;
    for (int i = 0; i < n; i++) begin
      // answer last cycle's read
      x1 = 0; x2 = 0;
      if (p_valid && ($urandom % err_rate) == 0) begin
        case ($urandom % 3)
          0: x1 = 8'(1 << ($urandom % 8));
          1: x2 = 8'(1 << ($urandom % 8));
          default: begin x1 = 8'($urandom) | 8'h01; x2 = 8'($urandom) | 8'h80; end
        endcase
      end
      dout_m1  = p_e1 ^ x1;
      dout_m2  = p_e2 ^ x2;
      // new read (or idle cycle with junk on the data lines)
      rd_issue = ($urandom % 4) != 0;
      rd_addr  = 7'($urandom);
      rd_elem  = 3'($urandom % 6);
      exp_m1   = ($urandom % 2) ? 8'hFF : 8'h00;
      exp_m2   = ~exp_m1;
      if (!p_valid) begin dout_m1 = 8'($urandom); dout_m2 = 8'($urandom); end
      @(posedge clk);
      #1;
      if (p_valid) begin
        m_rd++;
        if (x1 != 0 || x2 != 0) begin
          if (!(m_f1 || m_f2)) begin
            m_first_addr = {x1 == 0, p_addr};
            m_first_elem = p_elem;
            m_first_syn  = (x1 != 0) ? x1 : x2;
          end
          if (x1 != 0) begin m_f1 = 1; m_err++; end
          if (x2 != 0) begin m_f2 = 1; m_err++; end
        end
      end
      compare("after a cycle");
      p_valid = rd_issue;
      p_addr  = rd_addr;
      p_elem  = rd_elem;
      p_e1    = exp_m1;
      p_e2    = exp_m2;
    end
    rd_issue = 1'b0;
    dout_m1  = p_e1;
    dout_m2  = p_e2;
    @(posedge clk);
    #1;
    if (p_valid) begin
      m_rd++;
    end
    compare("end of run");
  endtask

  initial begin
    model_clear();
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    compare("after reset");
    run(2000, 1000000);     // fault-free
    run(3000, 40);          // with corrupted reads
    clear = 1'b1;
    @(posedge clk);
    #1;
    clear = 1'b0;
    model_clear();
    compare("after clear");
    run(3000, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
