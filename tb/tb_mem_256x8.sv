// tb_mem_256x8: checks the two-subgroup memory: M1 and M2 written and read in
// the same cycle with different data, every word of the 256 checked against
// a reference array, and an injected fault landing only in the subgroup that
// its address selects.
module tb_mem_256x8;
  import march_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       ce_m1 = 1'b0, we_m1 = 1'b0, ce_m2 = 1'b0, we_m2 = 1'b0;
  logic [6:0] addr_m1 = '0, addr_m2 = '0;
  logic [7:0] din_m1 = '0, din_m2 = '0, dout_m1, dout_m2;
  logic       flt_en = 1'b0;
  fault_kind_e flt_kind = FLT_SA1;
  logic [7:0] flt_addr = '0;
  logic [2:0] flt_bit = '0;

  logic [7:0] model [256];

  mem_256x8 dut (
    .clk(clk),
    .ce_m1(ce_m1), .we_m1(we_m1), .addr_m1(addr_m1), .din_m1(din_m1), .dout_m1(dout_m1),
    .ce_m2(ce_m2), .we_m2(we_m2), .addr_m2(addr_m2), .din_m2(din_m2), .dout_m2(dout_m2),
    .flt_en(flt_en), .flt_kind(flt_kind), .flt_addr(flt_addr), .flt_bit(flt_bit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr2(input int a1, input logic [7:0] d1, input int a2, input logic [7:0] d2);
    ce_m1 = 1'b1; we_m1 = 1'b1; addr_m1 = 7'(a1); din_m1 = d1;
    ce_m2 = 1'b1; we_m2 = 1'b1; addr_m2 = 7'(a2); din_m2 = d2;
    @(posedge clk);
    #1;
    ce_m1 = 1'b0; we_m1 = 1'b0; ce_m2 = 1'b0; we_m2 = 1'b0;
  endtask

  task automatic rd2(input int a1, input int a2, input logic [7:0] e1, input logic [7:0] e2);
    ce_m1 = 1'b1; we_m1 = 1'b0; addr_m1 = 7'(a1);
    ce_m2 = 1'b1; we_m2 = 1'b0; addr_m2 = 7'(a2);
    @(posedge clk);
    #1;
    ce_m1 = 1'b0; ce_m2 = 1'b0;
    checks += 2;
    if (dout_m1 !== e1) begin failures++; $display("FAIL M1[%0d] %h exp %h", a1, dout_m1, e1); end
    if (dout_m2 !== e2) begin failures++; $display("FAIL M2[%0d] %h exp %h", a2, dout_m2, e2); end
  endtask

  initial begin
    logic [7:0] d1, d2;
    @(posedge clk);
    #1;
    // concurrent fill: word i of M1 with random data, word 127-i of M2
    for (int i = 0; i < 128; i++) begin
      d1 = 8'($urandom); d2 = 8'($urandom);
      wr2(i, d1, 127 - i, d2);
      model[i] = d1; model[128 + 127 - i] = d2;
    end
    for (int i = 0; i < 128; i++) rd2(i, (i * 5) % 128, model[i], model[128 + (i * 5) % 128]);
    // complementary backgrounds, as the March test writes them
    for (int i = 0; i < 128; i++) begin
      wr2(i, 8'h00, i, 8'hFF);
      model[i] = 8'h00; model[128 + i] = 8'hFF;
    end
    // stuck-at-1 at full address 0xC5 (M2, word 0x45): only M2 word 0x45 changes
    flt_en = 1'b1; flt_kind = FLT_SA1; flt_addr = 8'hC5; flt_bit = 3'd6;
    rd2(8'h45, 8'h45, 8'h00, 8'hFF);
    flt_kind = FLT_SA0;
    rd2(8'h45, 8'h45, 8'h00, 8'hBF);
    // same word in M1 (full address 0x45)
    flt_addr = 8'h45; flt_kind = FLT_SA1;
    rd2(8'h45, 8'h45, 8'h40, 8'hFF);
    // both words all ones: a stuck-at-0 shows only in the selected subgroup
    flt_en = 1'b0;
    wr2(8'h45, 8'hFF, 8'h45, 8'hFF);
    flt_en = 1'b1; flt_kind = FLT_SA0; flt_addr = 8'h45; flt_bit = 3'd1;
    rd2(8'h45, 8'h45, 8'hFD, 8'hFF);
    flt_addr = 8'hC5;
    rd2(8'h45, 8'h45, 8'hFF, 8'hFD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
