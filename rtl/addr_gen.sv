// addr_gen: address generator of the March BIST.
//
// An up/down counter over the addresses of one memory subgroup. Both
// subgroups (M1 and M2) are walked with the same local address in the same
// cycle, which is what lets the two halves be tested concurrently.
//
// Interface and timing: `load` sets the counter, on the next clock edge, to
// the first address of an element in direction `dir` (0 for ascending, all
// ones for descending) and remembers the direction. `step` moves it one
// address on in the remembered direction; `load` wins over `step`. `last` is
// combinational and is high while the counter holds the final address of the
// current direction. The ascending/descending orders come from the March
// notation; the counter itself is the simplest generator that produces them.
module addr_gen
  import march_pkg::*;
#(
  parameter int unsigned AW = MEM_ADDR_W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  dir_e          dir,
  input  logic          step,
  output logic [AW-1:0] addr,
  output logic          last
);

  dir_e cur_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr    <= '0;
      cur_dir <= DIR_UP;
    end else if (load) begin
      addr    <= (dir == DIR_DOWN) ? '1 : '0;
      cur_dir <= dir;
    end else if (step) begin
      addr    <= (cur_dir == DIR_DOWN) ? addr - 1'b1 : addr + 1'b1;
    end
  end

  assign last = (cur_dir == DIR_DOWN) ? (addr == '0) : (addr == '1);

endmodule
