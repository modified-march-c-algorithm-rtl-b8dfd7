// mem_256x8: the embedded memory under test, 256 words of 8 bits.
//
// The memory is organised as two equal subgroups: M1 holds the lower half of
// the address space (address bit 7 = 0) and M2 the upper half (bit 7 = 1).
// Each subgroup is a separate sram_bank with its own port, so the BIST can
// read or write one word in M1 and one in M2 in the same clock cycle, which
// is what the concurrent Modified March C- test needs.
//
// Interface and timing: per subgroup a synchronous port (`ce_mN`, `we_mN`,
// local address `addr_mN`, `din_mN`, `dout_mN`, read data one clock after
// the request). A single fault can be injected anywhere in the 256-word space
// through `flt_*`; `flt_addr` is a full address and its top bit picks the
// subgroup. The 256 x 8 size and the halving follow the algorithm
// description; the two-port organisation is this implementation's reading of
// "applied to all subgroups concurrently".
module mem_256x8
  import march_pkg::*;
#(
  parameter int unsigned AW = MEM_ADDR_W,
  parameter int unsigned DW = MEM_DATA_W
) (
  input  logic                  clk,
  // subgroup M1
  input  logic                  ce_m1,
  input  logic                  we_m1,
  input  logic [AW-2:0]         addr_m1,
  input  logic [DW-1:0]         din_m1,
  output logic [DW-1:0]         dout_m1,
  // subgroup M2
  input  logic                  ce_m2,
  input  logic                  we_m2,
  input  logic [AW-2:0]         addr_m2,
  input  logic [DW-1:0]         din_m2,
  output logic [DW-1:0]         dout_m2,
  // fault injection
  input  logic                  flt_en,
  input  fault_kind_e           flt_kind,
  input  logic [AW-1:0]         flt_addr,
  input  logic [$clog2(DW)-1:0] flt_bit
);

  sram_bank #(.AW(AW - 1), .DW(DW)) u_m1 (
    .clk      (clk),
    .ce       (ce_m1),
    .we       (we_m1),
    .addr     (addr_m1),
    .din      (din_m1),
    .dout     (dout_m1),
    .flt_en   (flt_en && !flt_addr[AW-1]),
    .flt_kind (flt_kind),
    .flt_addr (flt_addr[AW-2:0]),
    .flt_bit  (flt_bit)
  );

  sram_bank #(.AW(AW - 1), .DW(DW)) u_m2 (
    .clk      (clk),
    .ce       (ce_m2),
    .we       (we_m2),
    .addr     (addr_m2),
    .din      (din_m2),
    .dout     (dout_m2),
    .flt_en   (flt_en && flt_addr[AW-1]),
    .flt_kind (flt_kind),
    .flt_addr (flt_addr[AW-2:0]),
    .flt_bit  (flt_bit)
  );

endmodule
