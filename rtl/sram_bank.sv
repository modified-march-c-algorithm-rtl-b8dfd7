// sram_bank: one subgroup (M1 or M2) of the embedded memory under test.
//
// A synchronous single-port RAM of 2**AW words of DW bits. A read (ce high,
// we low) returns the addressed word on `dout` after the clock edge; a write
// (ce and we high) stores `din` at the edge. `dout` holds its value on cycles
// without a read. The array itself has no reset, as in a real SRAM macro.
//
// To exercise the BIST, the bank can be made to show one single-cell fault
// from the functional fault models of the algorithm: a stuck-at fault (the
// bit always reads as 0 or 1) or a transition fault (the bit cannot change
// 0 -> 1, or 1 -> 0, when written). `flt_en` enables it; `flt_addr` and
// `flt_bit` pick the cell. Stuck-at faults act on what is stored and on what
// is read, so they also show when enabled after the cell was written.
// The subgroup split and the fault models follow the algorithm description;
// the single-port synchronous organisation and the injection port are
// choices of this implementation.
module sram_bank
  import march_pkg::*;
#(
  parameter int unsigned AW = MEM_ADDR_W - 1,
  parameter int unsigned DW = MEM_DATA_W
) (
  input  logic                  clk,
  input  logic                  ce,
  input  logic                  we,
  input  logic [AW-1:0]         addr,
  input  logic [DW-1:0]         din,
  output logic [DW-1:0]         dout,
  // fault injection
  input  logic                  flt_en,
  input  fault_kind_e           flt_kind,
  input  logic [AW-1:0]         flt_addr,
  input  logic [$clog2(DW)-1:0] flt_bit
);

  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] wr_word;
  logic [DW-1:0] rd_word;
  logic [DW-1:0] old_word;

  // Word actually stored by a write, after the fault (if any) acts on it.
  always_comb begin
    old_word = mem[addr];
    wr_word  = din;
    if (flt_en && addr == flt_addr) begin
      unique case (flt_kind)
        FLT_SA0:     wr_word[flt_bit] = 1'b0;
        FLT_SA1:     wr_word[flt_bit] = 1'b1;
        FLT_TF_UP:   if (!old_word[flt_bit] &&  din[flt_bit]) wr_word[flt_bit] = 1'b0;
        FLT_TF_DOWN: if ( old_word[flt_bit] && !din[flt_bit]) wr_word[flt_bit] = 1'b1;
        default:     ;
      endcase
    end
  end

  // Word seen by a read.
  always_comb begin
    rd_word = old_word;
    if (flt_en && addr == flt_addr) begin
      if (flt_kind == FLT_SA0) rd_word[flt_bit] = 1'b0;
      if (flt_kind == FLT_SA1) rd_word[flt_bit] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ce && we) mem[addr] <= wr_word;
  end

  always_ff @(posedge clk) begin
    if (ce && !we) dout <= rd_word;
  end

endmodule
