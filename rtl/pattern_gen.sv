// pattern_gen: test sequence generator with the complementing inverter.
//
// Modified March C- writes and expects a value v in subgroup M1 and its
// complement ~v in subgroup M2 in the same cycle. The generator expands the
// element's single data bit into a data background word for M1 and passes it
// through one inverter to obtain the word for M2; the inverter is the only
// hardware the concurrent scheme adds to an ordinary March generator.
//
// Interface and timing: purely combinational. `val` is the data bit of the
// current operation; `d_m1` and `d_m2` serve both as write data and as the
// expected read data. A solid background (all bits equal) follows the
// algorithm's w0/w1 notation applied to every bit of a word.
module pattern_gen #(
  parameter int unsigned DW = march_pkg::MEM_DATA_W
) (
  input  logic          val,
  output logic [DW-1:0] d_m1,
  output logic [DW-1:0] d_m2
);

  always_comb begin
    d_m1 = {DW{val}};
    d_m2 = ~d_m1;
  end

endmodule
