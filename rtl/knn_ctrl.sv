// knn_ctrl: control unit of the KNN associative memory.
//
// Executes one host command at a time (busy is high while one runs):
//   OP_WR_REF/IN/CS/CLS  single-cycle writes, passed to the array decoders;
//   OP_CLR_DEC           clears all distance accumulators;
//   OP_COMPUTE           starts all DCUs and waits for them (N cycles); the
//                        DECs add the new squared differences;
//   OP_SET_TOP           sets the first distance bit the search evaluates;
//   OP_SEARCH            KNN classification with k = cmd_data.
// A search clears the DEU counters, the voted flags and the vote counters,
// then alternates between two phases. SEARCH: the bit activator runs the
// clock-mapping search until a vector matches at the LSB. VOTE: the scan
// token selects one newly matched vector per cycle and its class is voted,
// until k votes are in (END) or no new match is left. In the latter case the
// search runs again. The search ends after k
// votes or when every vector has been voted; done then pulses for one cycle.
// When a vote scan ends before k votes, the DEU counters are cleared and the
// bit activator restarts at the top bit: the next search finds the nearest
// of the vectors not voted yet (voted vectors are left out of the OR tree),
// so every further neighbour costs at most (top_bit+1) x (d+1) clocks.
//
// The phases and the k-vote end follow the original design. The host command set,
// restarting the search for further neighbours and the early end when all
// vectors are voted are this design's choices.
//
// first_clocks holds the bit activator's clock count at the first LSB match
// (the nearest-neighbour search time); nn_capture pulses at that cycle.
module knn_ctrl
  import knn_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned CLK_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  logic             cmd_valid,
  input  cmd_op_t          cmd_op,
  input  logic [AW-1:0]    cmd_addr,
  input  logic [N-1:0]     cmd_data,
  output logic             busy,
  output logic             done,
  // array
  output logic             wr_ref,
  output logic             wr_in,
  output logic             wr_cs,
  output logic             wr_cls,
  output logic [AW-1:0]    addr,
  output logic [N-1:0]     wdata,
  output logic             dcu_start,
  output logic             dec_clr,
  input  logic             dcu_done,
  output logic             srch_clr,
  output logic             cnt_clr,
  input  logic             scan_end,
  input  logic             all_voted,
  output logic             vote_en,
  // bit activator
  output logic             ba_load,
  output logic [LVL_W-1:0] top_bit,
  output logic             run,
  input  logic             lsb_hit,
  input  logic [CLK_W-1:0] clocks,
  // majority vote
  output logic             mvc_clr,
  output logic [PW-1:0]    k,
  input  logic             end_o,
  // status
  output logic             nn_capture,
  output logic [CLK_W-1:0] first_clocks
);

  typedef enum logic [2:0] {S_IDLE, S_COMP, S_SRCH, S_VOTE, S_DONE} state_t;

  state_t state;
  logic   first;    // no LSB match seen yet in this search
  logic   accept;
  logic   resume;   // vote scan ended before k votes: search again

  assign accept = cmd_valid && state == S_IDLE;
  assign addr   = cmd_addr;
  assign wdata  = cmd_data;

  assign wr_ref    = accept && cmd_op == OP_WR_REF;
  assign wr_in     = accept && cmd_op == OP_WR_IN;
  assign wr_cs     = accept && cmd_op == OP_WR_CS;
  assign wr_cls    = accept && cmd_op == OP_WR_CLS;
  assign dec_clr   = accept && cmd_op == OP_CLR_DEC;
  assign dcu_start = accept && cmd_op == OP_COMPUTE;
  assign srch_clr  = accept && cmd_op == OP_SEARCH;
  assign resume    = state == S_VOTE && !end_o && scan_end && !all_voted;
  assign cnt_clr   = resume;
  assign ba_load   = srch_clr | resume;
  assign mvc_clr   = srch_clr;

  assign busy       = state != S_IDLE;
  assign done       = state == S_DONE;
  assign run        = state == S_SRCH;
  assign vote_en    = state == S_VOTE && !end_o;
  assign nn_capture = run && lsb_hit && first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      first        <= 1'b0;
      k            <= PW'(1);
      top_bit      <= LVL_W'(2 * N - 1);
      first_clocks <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          unique case (cmd_op)
            OP_COMPUTE: state <= S_COMP;
            OP_SET_TOP: top_bit <= LVL_W'(cmd_data);
            OP_SEARCH: begin
              k     <= cmd_data[PW-1:0];
              first <= 1'b1;
              state <= S_SRCH;
            end
            default: ;
          endcase
        end
        S_COMP: if (dcu_done) state <= S_IDLE;
        S_SRCH: if (lsb_hit) begin
          if (first) first_clocks <= clocks;
          first <= 1'b0;
          state <= S_VOTE;
        end
        S_VOTE: begin
          if (end_o)                      state <= S_DONE;
          else if (scan_end && all_voted) state <= S_DONE;
          else if (resume)                state <= S_SRCH;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A search must see a match at the LSB before it votes.
  assert property (@(posedge clk)
                   (state == S_SRCH && lsb_hit) |=> state == S_VOTE)
    else $error("knn_ctrl: LSB match did not start a vote");

endmodule
