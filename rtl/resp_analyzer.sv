// resp_analyzer: compares the words read back from both subgroups with the
// values the March test expects there.
//
// A memory device passes when every value read back equals the value written;
// any mismatch is a failure. Because both subgroups are read in the same
// cycle, the analyzer has one comparator per subgroup. Each read the
// controller issues is registered here together with its expected words, its
// local address and its March element; one clock later, when the synchronous
// memory presents the data, the two words are compared. Mismatches set the
// sticky flags `fail_m1` / `fail_m2` (and `fail`), are counted in
// `err_count` (one count per failing subgroup word, saturating), and the
// first failing word is recorded: its full address (top bit = subgroup), the
// element that found it and the failing bits (`first_syndrome`, read XOR
// expected). `rd_count` counts the compared reads (one per cycle, covering
// both subgroups). `clear` resets all of it at the start of a test.
//
// Read-back comparison follows the algorithm description. Recording the
// first failure and carrying on to the end of the test, instead of stopping
// at the first mismatch, is a choice of this implementation: the test time is
// then the same with and without a fault.
module resp_analyzer
  import march_pkg::*;
#(
  parameter int unsigned AW  = MEM_ADDR_W,
  parameter int unsigned DW  = MEM_DATA_W,
  parameter int unsigned CW  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // read issued this cycle
  input  logic          rd_issue,
  input  logic [AW-2:0] rd_addr,
  input  logic [2:0]    rd_elem,
  input  logic [DW-1:0] exp_m1,
  input  logic [DW-1:0] exp_m2,
  // read data, one cycle later
  input  logic [DW-1:0] dout_m1,
  input  logic [DW-1:0] dout_m2,
  // results
  output logic          fail,
  output logic          fail_m1,
  output logic          fail_m2,
  output logic [CW-1:0] err_count,
  output logic [CW-1:0] rd_count,
  output logic [AW-1:0] first_addr,
  output logic [2:0]    first_elem,
  output logic [DW-1:0] first_syndrome
);

  logic          pend;
  logic [AW-2:0] pend_addr;
  logic [2:0]    pend_elem;
  logic [DW-1:0] pend_exp_m1, pend_exp_m2;
  logic [DW-1:0] syn_m1, syn_m2;
  logic          mis_m1, mis_m2;
  logic [1:0]    n_mis;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend        <= 1'b0;
      pend_addr   <= '0;
      pend_elem   <= '0;
      pend_exp_m1 <= '0;
      pend_exp_m2 <= '0;
    end else begin
      pend <= rd_issue && !clear;
      if (rd_issue) begin
        pend_addr   <= rd_addr;
        pend_elem   <= rd_elem;
        pend_exp_m1 <= exp_m1;
        pend_exp_m2 <= exp_m2;
      end
    end
  end

  always_comb begin
    syn_m1 = dout_m1 ^ pend_exp_m1;
    syn_m2 = dout_m2 ^ pend_exp_m2;
    mis_m1 = pend && (syn_m1 != '0);
    mis_m2 = pend && (syn_m2 != '0);
    n_mis  = {1'b0, mis_m1} + {1'b0, mis_m2};
  end

  assign fail = fail_m1 || fail_m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_m1        <= 1'b0;
      fail_m2        <= 1'b0;
      err_count      <= '0;
      rd_count       <= '0;
      first_addr     <= '0;
      first_elem     <= '0;
      first_syndrome <= '0;
    end else if (clear) begin
      fail_m1        <= 1'b0;
      fail_m2        <= 1'b0;
      err_count      <= '0;
      rd_count       <= '0;
      first_addr     <= '0;
      first_elem     <= '0;
      first_syndrome <= '0;
    end else if (pend) begin
      if (rd_count != '1) rd_count <= rd_count + 1'b1;
      if (mis_m1) fail_m1 <= 1'b1;
      if (mis_m2) fail_m2 <= 1'b1;
      if (n_mis != 2'd0) begin
        err_count <= (err_count > CW'('1) - CW'(n_mis)) ? '1 : err_count + CW'(n_mis);
      end
      if (!fail && (mis_m1 || mis_m2)) begin
        first_addr     <= {!mis_m1, pend_addr};
        first_elem     <= pend_elem;
        first_syndrome <= mis_m1 ? syn_m1 : syn_m2;
      end
    end
  end

endmodule
