// mbist_top: memory built-in self-test running the Modified March C-
// algorithm on an embedded memory, 256 x 8 by default.
//
// The memory is split into two subgroups, M1 (lower half of the addresses)
// and M2 (upper half). One controller, one address generator and one test
// sequence generator drive both subgroups in the same cycle: M1 receives the
// element's data background and M2, through an inverter, its complement. Both
// words read back are compared at once. Every cell sees 8 operations, and
// the two halves are worked on together, so a full test of 256 words takes
// 8 * 128 = 1024 memory cycles (4 * 2**AW in general).
//
//   march_ctrl --ag_load/step--> addr_gen --ad--+--> M1 port  (mem_256x8)
//        |  op_val                               +--> M2 port
//        +--> pattern_gen --d_m1 (true)--------------> M1 din / expected
//                         --d_m2 (inverted)----------> M2 din / expected
//   mem dout_m1/dout_m2 --> resp_analyzer --> fail flags, first failure
//
// Interface and timing: hold `en` high to run the test; `busy` is high while
// it runs and `done` rises 4 * 2**AW + 1 clocks (1025 at the default size)
// after the edge that sampled `en`, then holds with the results until `en`
// falls. `fail` (and `fail_m1`, `fail_m2` per subgroup) tell whether any word
// read back differed from the expected one; `first_*` describe the first such
// word. `ad`, `wr`, `rd` and `di` show the memory access of the current cycle
// (local address, write, read, M1 data word). The `flt_*` inputs inject one
// stuck-at or transition fault into the memory model to exercise the test;
// tie `flt_en` low in normal use.
//
// The algorithm, the two subgroups, the inverter and the 256 x 8 size follow
// the published Modified March C- scheme, and the names en/wr/rd/ad/di follow
// its simulation waveforms. One operation per clock, the status outputs and
// the fault-injection port are choices of this implementation.
module mbist_top
  import march_pkg::*;
#(
  parameter int unsigned AW = MEM_ADDR_W,   // memory address bits (both subgroups)
  parameter int unsigned DW = MEM_DATA_W    // memory word width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  // fault injection into the memory model
  input  logic                          flt_en,
  input  fault_kind_e                   flt_kind,
  input  logic [AW-1:0]                 flt_addr,
  input  logic [$clog2(DW)-1:0]         flt_bit,
  // status
  output logic                          busy,
  output logic                          done,
  output logic                          fail,
  output logic                          fail_m1,
  output logic                          fail_m2,
  output logic [15:0]                   err_count,
  output logic [15:0]                   rd_count,
  output logic [AW-1:0]                 first_addr,
  output logic [2:0]                    first_elem,
  output logic [DW-1:0]                 first_syndrome,
  // memory access of the current cycle
  output logic [2:0]                    elem,
  output logic [AW-2:0]                 ad,
  output logic                          wr,
  output logic                          rd,
  output logic [DW-1:0]                 di
);

  localparam int unsigned GAW = AW - 1;

  logic                  ag_load, ag_step, ag_last;
  dir_e                  ag_dir;
  logic                  op_valid, op_val;
  op_kind_e              op_wr;
  logic [DW-1:0]         d_m1, d_m2;
  logic [DW-1:0]         dout_m1, dout_m2;
  logic                  start;

  march_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .ag_load  (ag_load),
    .ag_step  (ag_step),
    .ag_dir   (ag_dir),
    .ag_last  (ag_last),
    .op_valid (op_valid),
    .op_wr    (op_wr),
    .op_val   (op_val),
    .elem     (elem),
    .busy     (busy),
    .done     (done)
  );

  addr_gen #(.AW(GAW)) u_addr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ag_load),
    .dir   (ag_dir),
    .step  (ag_step),
    .addr  (ad),
    .last  (ag_last)
  );

  pattern_gen #(.DW(DW)) u_pat (
    .val  (op_val),
    .d_m1 (d_m1),
    .d_m2 (d_m2)
  );

  assign wr = op_valid && (op_wr == OP_WRITE);
  assign rd = op_valid && (op_wr == OP_READ);
  assign di = d_m1;

  // Both subgroups see the same operation at the same local address.
  mem_256x8 #(.AW(AW), .DW(DW)) u_mem (
    .clk      (clk),
    .ce_m1    (op_valid),
    .we_m1    (wr),
    .addr_m1  (ad),
    .din_m1   (d_m1),
    .dout_m1  (dout_m1),
    .ce_m2    (op_valid),
    .we_m2    (wr),
    .addr_m2  (ad),
    .din_m2   (d_m2),
    .dout_m2  (dout_m2),
    .flt_en   (flt_en),
    .flt_kind (flt_kind),
    .flt_addr (flt_addr),
    .flt_bit  (flt_bit)
  );

  // A new test starts on the cycle the controller leaves IDLE.
  assign start = en && !busy && !done;

  resp_analyzer #(.AW(AW), .DW(DW), .CW(16)) u_resp (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (start),
    .rd_issue       (rd),
    .rd_addr        (ad),
    .rd_elem        (elem),
    .exp_m1         (d_m1),
    .exp_m2         (d_m2),
    .dout_m1        (dout_m1),
    .dout_m2        (dout_m2),
    .fail           (fail),
    .fail_m1        (fail_m1),
    .fail_m2        (fail_m2),
    .err_count      (err_count),
    .rd_count       (rd_count),
    .first_addr     (first_addr),
    .first_elem     (first_elem),
    .first_syndrome (first_syndrome)
  );

endmodule
