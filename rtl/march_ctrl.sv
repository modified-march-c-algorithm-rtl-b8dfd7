// march_ctrl: sequencer of the Modified March C- test.
//
// Runs the six March elements of march_pkg::elem_desc in order. Within an
// element it applies the element's one or two operations to an address, one
// operation per clock, then moves the shared address generator on; after the
// last address of an element it loads the generator with the first address of
// the next element, in that element's order, without an idle cycle. Every
// operation goes to both subgroups at once (M1 gets `op_val`, M2 its
// complement), so the whole test takes 8 operations per cell of one subgroup:
// 8 * (words / 2) clocks.
//
// Interface and timing: raise `en` (a level) in IDLE; the clock edge that
// samples it loads the first address and the next cycle issues the first
// operation. `op_valid`, `op_wr`, `op_val` and `elem` describe the operation
// of the current cycle at the address shown by the address generator. After
// the last operation one DRAIN cycle lets the response analyzer compare the
// final read; then `done` is high and stays high until `en` is released, which
// returns the controller to IDLE. With 256 words, `done` rises 4*256+1 = 1025
// clock edges after the edge that sampled `en`.
//
// The element sequence follows the algorithm; the one-operation-per-clock
// timing, the level-sensitive `en` and the drain cycle are choices of this
// implementation.
module march_ctrl
  import march_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  // address generator
  output logic       ag_load,
  output logic       ag_step,
  output dir_e       ag_dir,
  input  logic       ag_last,
  // operation of this cycle
  output logic       op_valid,
  output op_kind_e   op_wr,
  output logic       op_val,
  output logic [2:0] elem,
  output logic       busy,
  output logic       done
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_RUN,
    S_DRAIN,
    S_DONE
  } state_e;

  state_e      state, state_nx;
  logic [2:0]  elem_nx;
  logic        opi, opi_nx;      // index of the operation within the element
  march_elem_t cur;
  dir_e        nxt_dir;          // order of the element that follows
  march_op_t   cur_op;

  always_comb begin
    cur     = elem_desc(elem);
    nxt_dir = elem_desc(elem + 3'd1).dir;
    cur_op  = opi ? cur.op1 : cur.op0;
  end

  always_comb begin
    state_nx = state;
    elem_nx  = elem;
    opi_nx   = opi;
    ag_load  = 1'b0;
    ag_step  = 1'b0;
    ag_dir   = cur.dir;
    op_valid = 1'b0;
    op_wr    = OP_READ;
    op_val   = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (en) begin
          state_nx = S_RUN;
          elem_nx  = 3'd0;
          opi_nx   = 1'b0;
          ag_load  = 1'b1;
          ag_dir   = elem_desc(3'd0).dir;
        end
      end
      S_RUN: begin
        op_valid = 1'b1;
        op_wr    = cur_op.kind;
        op_val   = cur_op.val;
        if (cur.two_ops && !opi) begin
          opi_nx = 1'b1;
        end else begin
          opi_nx = 1'b0;
          if (!ag_last) begin
            ag_step = 1'b1;
          end else if (elem == 3'(NUM_ELEMS - 1)) begin
            state_nx = S_DRAIN;
          end else begin
            elem_nx = elem + 3'd1;
            ag_load = 1'b1;
            ag_dir  = nxt_dir;
          end
        end
      end
      S_DRAIN: state_nx = S_DONE;
      S_DONE:  if (!en) state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      elem  <= '0;
      opi   <= 1'b0;
    end else begin
      state <= state_nx;
      elem  <= elem_nx;
      opi   <= opi_nx;
    end
  end

  assign busy = (state == S_RUN) || (state == S_DRAIN);
  assign done = (state == S_DONE);

endmodule
