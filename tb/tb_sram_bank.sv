// tb_sram_bank: checks one memory subgroup against an array kept in the
// testbench: random writes and reads with one-cycle read latency, `dout`
// holding between reads, and each of the four injectable faults (stuck-at-0,
// stuck-at-1, up and down transition) acting on the selected bit only.
module tb_sram_bank;
  import march_pkg::*;

  localparam int unsigned AW = 7;
  localparam int unsigned DW = 8;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          ce = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] din = '0;
  logic [DW-1:0] dout;
  logic          flt_en = 1'b0;
  fault_kind_e   flt_kind = FLT_SA0;
  logic [AW-1:0] flt_addr = '0;
  logic [2:0]    flt_bit = '0;

  logic [DW-1:0] model [2**AW];

  sram_bank #(.AW(AW), .DW(DW)) dut (
    .clk(clk), .ce(ce), .we(we), .addr(addr), .din(din), .dout(dout),
    .flt_en(flt_en), .flt_kind(flt_kind), .flt_addr(flt_addr), .flt_bit(flt_bit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [DW-1:0] d);
    ce = 1'b1; we = 1'b1; addr = AW'(a); din = d;
    @(posedge clk);
    #1;
    ce = 1'b0; we = 1'b0;
  endtask

  task automatic rd_check(input int a, input logic [DW-1:0] exp, input string what);
    ce = 1'b1; we = 1'b0; addr = AW'(a);
    @(posedge clk);
    #1;
    ce = 1'b0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: addr %0d read %h expected %h", what, a, dout, exp);
    end
  endtask

  initial begin
    int a;
    logic [DW-1:0] d, held;
    @(posedge clk);
    #1;
    // fill the bank, then random traffic
    for (int i = 0; i < 2**AW; i++) begin
      d = DW'($urandom);
      wr(i, d);
      model[i] = d;
    end
    for (int i = 0; i < 2000; i++) begin
      a = int'($urandom % (2**AW));
      if ($urandom % 2) begin
        d = DW'($urandom);
        wr(a, d);
        model[a] = d;
      end else begin
        rd_check(a, model[a], "random read");
      end
    end
    // dout holds on idle cycles and on writes
    rd_check(5, model[5], "read before hold");
    held = dout;
    wr(6, 8'h3C); model[6] = 8'h3C;
    repeat (3) @(posedge clk);
    checks++;
    if (dout !== held) begin failures++; $display("FAIL dout did not hold"); end

    // stuck-at-0 on bit 3 of word 17
    flt_en = 1'b1; flt_kind = FLT_SA0; flt_addr = 7'd17; flt_bit = 3'd3;
    wr(17, 8'hFF);
    rd_check(17, 8'hF7, "SA0 cell");
    wr(18, 8'hFF);
    rd_check(18, 8'hFF, "SA0 neighbour");
    // stuck-at-1 on bit 0 of word 100, also visible on data written before
    wr(100, 8'h00);
    flt_kind = FLT_SA1; flt_addr = 7'd100; flt_bit = 3'd0;
    rd_check(100, 8'h01, "SA1 on old data");
    wr(100, 8'h80);
    rd_check(100, 8'h81, "SA1 cell");
    // up transition fault on bit 7 of word 3: 0 -> 1 fails, 1 stays 1
    flt_en = 1'b0;
    wr(3, 8'h00);
    flt_en = 1'b1; flt_kind = FLT_TF_UP; flt_addr = 7'd3; flt_bit = 3'd7;
    wr(3, 8'hFF);
    rd_check(3, 8'h7F, "TF up blocked");
    flt_en = 1'b0;
    wr(3, 8'h80);
    flt_en = 1'b1;
    wr(3, 8'hC0);
    rd_check(3, 8'hC0, "TF up keeps 1");
    // down transition fault on bit 2 of word 127: 1 -> 0 fails
    flt_en = 1'b0;
    wr(127, 8'hFF);
    flt_en = 1'b1; flt_kind = FLT_TF_DOWN; flt_addr = 7'd127; flt_bit = 3'd2;
    wr(127, 8'h00);
    rd_check(127, 8'h04, "TF down blocked");
    wr(127, 8'h04);
    wr(126, 8'h00);
    rd_check(126, 8'h00, "TF down neighbour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
