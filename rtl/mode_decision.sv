// mode_decision: modified three-step fast mode decision for the nine
// directional intra modes of one 4x4 or 8x8 block, with cost compare and
// replace.
//
// Decision flow:
//   step 1  evaluate modes 0 (vertical), 1 (horizontal) and 2 (DC)
//   step 2  evaluate modes 3 and 4
//   step 3  if cost(0) < cost(1) evaluate modes 5 and 7, else modes 6 and 8
//   step 4  the best mode is the one of least cost among those evaluated
// Seven of the nine modes are evaluated for every block.
//
// Each evaluated cost starts from an initial value: mpm_init_cost when the
// mode is the block's most probable mode, zero otherwise. The caller supplies
// mpm_init_cost from its lambda table. On equal cost the mode evaluated first
// is kept.
//
// Handshake: start (one cycle) latches mpm and mpm_init_cost. The unit then
// raises req_valid with req_mode for one cycle and waits for cost_valid with
// the cost of that mode before asking for the next. done pulses with
// best_mode and best_cost one cycle after the seventh cost.
//
// Origin: the three-step flow, compare-and-replace and the MPM initial cost
// follow the original design; the request/answer handshake and the tie rule
// are this design's own choices.
module mode_decision
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  mpm,
  input  logic [19:0] mpm_init_cost,
  output logic        req_valid,
  output logic [3:0]  req_mode,
  input  logic        cost_valid,
  input  logic [19:0] cost,
  output logic        done,
  output logic [3:0]  best_mode,
  output logic [20:0] best_cost,
  output logic        took_5_7      // step 3 branch taken (cost0 < cost1)
);

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_WAIT } state_t;
  state_t      state;
  logic [2:0]  step_i;         // index into the evaluation sequence, 0..6
  logic [3:0]  mpm_q;
  logic [19:0] init_q;
  logic [20:0] cost0, cur;
  logic        branch;

  // Mode evaluated at position k of the sequence.
  function automatic logic [3:0] seq_mode(input logic [2:0] k, input logic br);
    unique case (k)
      3'd0: return 4'd0;
      3'd1: return 4'd1;
      3'd2: return 4'd2;
      3'd3: return 4'd3;
      3'd4: return 4'd4;
      3'd5: return br ? 4'd5 : 4'd6;
      default: return br ? 4'd7 : 4'd8;
    endcase
  endfunction

  assign req_mode = seq_mode(step_i, branch);
  assign cur = 21'(cost) + ((req_mode == mpm_q) ? 21'(init_q) : 21'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      step_i    <= '0;
      mpm_q     <= '0;
      init_q    <= '0;
      cost0     <= '0;
      branch    <= 1'b0;
      req_valid <= 1'b0;
      done      <= 1'b0;
      best_mode <= '0;
      best_cost <= '0;
    end else begin
      req_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mpm_q  <= mpm;
          init_q <= mpm_init_cost;
          step_i <= '0;
          branch <= 1'b0;
          state  <= S_REQ;
        end
        S_REQ: begin
          req_valid <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (cost_valid) begin
          if (step_i == 0) cost0 <= cur;
          if (step_i == 1) branch <= (cost0 < cur);
          if (step_i == 0 || cur < best_cost) begin
            best_cost <= cur;
            best_mode <= req_mode;
          end
          if (step_i == 3'd6) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step_i <= step_i + 1;
            state  <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign took_5_7 = branch;

endmodule
