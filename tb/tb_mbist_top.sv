// tb_mbist_top: end-to-end test of the memory BIST at its full default size
// (256 x 8 memory, top parameters untouched): fault-free runs and runs with
// each kind of injected fault in each subgroup, checked against a software
// model of the Modified March C- test, with the test length checked to the
// clock. The test body is in mbist_e2e.svh.
module tb_mbist_top;
  import march_pkg::*;

  localparam int unsigned AW = MEM_ADDR_W;
  localparam int unsigned DW = MEM_DATA_W;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en = 1'b0;
  logic                flt_en = 1'b0;
  fault_kind_e         flt_kind = FLT_SA0;
  logic [AW-1:0]       flt_addr = '0;
  logic [$clog2(DW)-1:0] flt_bit = '0;
  logic                busy, done, fail, fail_m1, fail_m2;
  logic [15:0]         err_count, rd_count;
  logic [AW-1:0]       first_addr;
  logic [DW-1:0]       first_syndrome;
  logic [2:0]          first_elem, elem;
  logic [AW-2:0]       ad;
  logic                wr, rd;
  logic [DW-1:0]       di;

  mbist_top dut (
    .clk(clk), .rst_n(rst_n), .en(en),
    .flt_en(flt_en), .flt_kind(flt_kind), .flt_addr(flt_addr), .flt_bit(flt_bit),
    .busy(busy), .done(done), .fail(fail), .fail_m1(fail_m1), .fail_m2(fail_m2),
    .err_count(err_count), .rd_count(rd_count),
    .first_addr(first_addr), .first_elem(first_elem), .first_syndrome(first_syndrome),
    .elem(elem), .ad(ad), .wr(wr), .rd(rd), .di(di)
  );

`include "mbist_e2e.svh"

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
