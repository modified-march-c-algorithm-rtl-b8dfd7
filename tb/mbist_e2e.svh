// mbist_e2e.svh: body of the end-to-end BIST testbenches, shared by the
// full-size test (tb_mbist_top) and the small test (tb_mbist_fig). The
// including module declares the localparams AW and DW, the DUT signals and
// the DUT itself and a watchdog; everything below works for any size with
// AW >= 2.
//
// Each test run: a fault-free run must pass, take 4 * 2**AW + 1 clocks from
// the edge that samples `en` to `done`, and compare 4 reads per subgroup
// word. For a series of faults (stuck-at-0, stuck-at-1, up and down
// transition faults, in both subgroups) the memory is first brought to a
// known state by a clean run, the fault is injected and the test run again.
// The expected outcome (which subgroups fail, how many words mismatch, and
// the address, element and failing bits of the first mismatch) comes from a
// software model of the algorithm applied to an array with the same fault.
// Mechanism counters record concurrent complementary writes, ascending and
// descending sweeps, read-then-write on one address and the detection of each
// fault kind in each subgroup; one that never happened counts as a failure.

  localparam int N = 2 ** AW;   // words in the memory
  localparam int H = N / 2;     // words per subgroup

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- model
  // Modified March C-, subgroup M1 view; M2 uses the complement.
  localparam int N_OPS [6]    = '{1, 2, 1, 1, 2, 1};
  localparam bit DOWN  [6]    = '{0, 0, 0, 1, 1, 1};
  localparam bit IS_WR [6][2] = '{'{1, 0}, '{0, 1}, '{0, 0}, '{1, 0}, '{0, 1}, '{0, 0}};
  localparam bit VAL   [6][2] = '{'{0, 0}, '{0, 1}, '{1, 0}, '{0, 0}, '{0, 1}, '{1, 0}};

  bit [DW-1:0] mm [N];
  bit       e_f1, e_f2, e_any;
  int       e_err;
  bit [AW-1:0] e_addr;
  bit [DW-1:0] e_syn;
  bit [2:0] e_elem;

  function automatic bit [DW-1:0] fault_rd(input int a, input bit fe, input int fk, input int fa, input int fb);
    bit [DW-1:0] r;
    r = mm[a];
    if (fe && a == fa && fk == 0) r[fb] = 1'b0;
    if (fe && a == fa && fk == 1) r[fb] = 1'b1;
    return r;
  endfunction

  function automatic void fault_wr(input int a, input bit [DW-1:0] d, input bit fe, input int fk, input int fa, input int fb);
    bit [DW-1:0] n;
    n = d;
    if (fe && a == fa) begin
      case (fk)
        0: n[fb] = 1'b0;
        1: n[fb] = 1'b1;
        2: if (!mm[a][fb] && d[fb]) n[fb] = 1'b0;
        default: if (mm[a][fb] && !d[fb]) n[fb] = 1'b1;
      endcase
    end
    mm[a] = n;
  endfunction

  // State left by a fault-free run: M1 all ones, M2 all zeros.
  function automatic void model_run(input bit fe, input int fk, input int fa, input int fb);
    int a, full;
    bit [DW-1:0] w, r;
    for (int i = 0; i < N; i++) mm[i] = (i < H) ? '1 : '0;
    e_f1 = 0; e_f2 = 0; e_any = 0; e_err = 0; e_addr = 0; e_syn = 0; e_elem = 0;
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < H; k++) begin
        a = DOWN[e] ? H - 1 - k : k;
        for (int o = 0; o < N_OPS[e]; o++)
          for (int g = 0; g < 2; g++) begin
            full = g * H + a;
            w = (VAL[e][o] ^ g[0]) ? '1 : '0;
            if (IS_WR[e][o]) begin
              fault_wr(full, w, fe, fk, fa, fb);
            end else begin
              r = fault_rd(full, fe, fk, fa, fb);
              if (r != w) begin
                e_err++;
                if (g == 0) e_f1 = 1; else e_f2 = 1;
                if (!e_any) begin
                  e_any = 1; e_addr = AW'(full); e_syn = r ^ w; e_elem = 3'(e);
                end
              end
            end
          end
      end
  endfunction

  // ----------------------------------------------------------- mechanisms
  int n_wr0, n_wr1, n_up, n_down, n_rmw, n_clean;
  int n_det [2][4];
  logic          p_rd;
  logic [AW-2:0] p_ad;
  logic       p_valid = 1'b0;

  always @(posedge clk) begin
    if (wr && di == '0) n_wr0++;           // M1 gets 0s, M2 gets 1s
    if (wr && di == '1) n_wr1++;           // M1 gets 1s, M2 gets 0s
    if (p_valid && (wr || rd)) begin
      if (ad == p_ad + 1'b1) n_up++;
      if (ad == p_ad - 1'b1) n_down++;
      if (p_rd && wr && ad == p_ad) n_rmw++;
    end
    p_valid <= wr || rd;
    p_rd    <= rd;
    p_ad    <= ad;
  end

  // ----------------------------------------------------------------- runs
  int cyc;

  task automatic run_test(input string what);
    en = 1'b1;
    @(posedge clk);                       // samples en
    #1;
    cyc = 0;
    while (!done && cyc < 5000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check(cyc == 4 * N + 1, $sformatf("%s: test length %0d clocks, expected %0d", what, cyc, 4 * N + 1));
    check(int'(rd_count) == 4 * H, $sformatf("%s: %0d reads compared, expected %0d", what, rd_count, 4 * H));
  endtask

  task automatic finish_test();
    en = 1'b0;
    @(posedge clk);
    #1;
  endtask

  task automatic clean_run();
    flt_en = 1'b0;
    run_test("clean run");
    check(!fail && !fail_m1 && !fail_m2 && err_count == 0, "fault-free memory passes");
    n_clean++;
    finish_test();
  endtask

  task automatic fault_run(input int fk, input int fa, input int fb);
    string what;
    what = $sformatf("fault kind %0d at %h bit %0d", fk, fa, fb);
    clean_run();
    flt_en   = 1'b1;
    flt_kind = fault_kind_e'(fk);
    flt_addr = AW'(fa);
    flt_bit  = $bits(flt_bit)'(fb);
    model_run(1'b1, fk, fa, fb);
    run_test(what);
    checks++;
    if (fail !== (e_f1 | e_f2) || fail_m1 !== e_f1 || fail_m2 !== e_f2 || int'(err_count) != e_err ||
        (e_any && (first_addr !== e_addr || first_elem !== e_elem || first_syndrome !== e_syn))) begin
      failures++;
      $display("FAIL %s: fail %b%b/%b%b err %0d/%0d first %h/%h elem %0d/%0d syn %h/%h", what,
               fail_m1, fail_m2, e_f1, e_f2, err_count, e_err, first_addr, e_addr,
               first_elem, e_elem, first_syndrome, e_syn);
    end
    check(fail, $sformatf("%s is detected", what));
    if (fail_m1) n_det[0][fk]++;
    if (fail_m2) n_det[1][fk]++;
    finish_test();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    // the memory starts with random contents; the first run must still pass
    clean_run();
    // every fault kind in each subgroup, corner cells included
    fault_run(0, 0, 0);
    fault_run(1, H - 1, DW - 1);
    fault_run(2, H, 3 % DW);
    fault_run(3, N - 1, 5 % DW);
    fault_run(2, H / 2, 1);
    fault_run(3, H - 2, 6 % DW);
    fault_run(0, H + 1, 2);
    fault_run(1, N - 2, 4 % DW);
    for (int i = 0; i < 16; i++) fault_run(i % 4, int'($urandom % N), int'($urandom % DW));
    clean_run();

    $display("mechanisms: clean runs %0d, writes of 0s to M1 / 1s to M2 %0d, of 1s to M1 / 0s to M2 %0d",
             n_clean, n_wr0, n_wr1);
    $display("            ascending steps %0d, descending steps %0d, read-then-write %0d",
             n_up, n_down, n_rmw);
    $display("            detected in M1 SA0 %0d SA1 %0d TFup %0d TFdown %0d; in M2 SA0 %0d SA1 %0d TFup %0d TFdown %0d",
             n_det[0][0], n_det[0][1], n_det[0][2], n_det[0][3],
             n_det[1][0], n_det[1][1], n_det[1][2], n_det[1][3]);
    check(n_wr0 > 0 && n_wr1 > 0, "complementary backgrounds written");
    check(n_up > 0 && n_down > 0, "ascending and descending sweeps");
    check(n_rmw > 0, "read-then-write elements");
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < 4; k++)
        check(n_det[g][k] > 0, $sformatf("fault kind %0d detected in subgroup M%0d", k, g + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

