// system_controller - sequencer of the DSP-lite core.
//
// A kernel is compiled into a periodic schedule: N microinstructions that together
// run one iteration of the dataflow graph, with successive iterations overlapping only
// through the data the schedule leaves in the queues. On start the controller fetches
// slots pc_start .. pc_start+N-1 again and again, iter_count times, then lets the
// pipeline drain for DRAIN cycles of no-op slots so the last stores reach the I/O
// buffer, and reports done. At the end of every iteration it pulses iter_step_o, which
// rotates all address remappers; on start it pulses iter_clear_o. It also owns the
// ping-pong bank select, toggled by a swap request while idle. The document names
// this block only; its behaviour here is this design's own.
//
// Timing: fetch in cycle c (synchronous program memory), execute in c+1:
// exec_valid_o marks the execute cycle, iter_step_o comes with the execute cycle of
// slot N-1. A run of I iterations of N slots is busy for 1 + N*I + DRAIN cycles
// (start cycle included); cycles_o holds that count after the run.
module system_controller #(
  parameter int unsigned PC_W  = 10,
  parameter int unsigned ITER_W = 16,
  parameter int unsigned DRAIN = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic              swap_i,
  input  logic [PC_W-1:0]   pc_start_i,
  input  logic [PC_W:0]     prog_len_i,     // N, 1 .. 2**PC_W
  input  logic [ITER_W-1:0] iter_count_i,
  output logic              ucode_re_o,
  output logic [PC_W-1:0]   ucode_raddr_o,
  output logic              exec_valid_o,
  output logic              iter_clear_o,
  output logic              iter_step_o,
  output logic              busy_o,
  output logic              done_o,
  output logic              bank_sel_o,
  output logic [ITER_W-1:0] iter_idx_o,     // iteration being executed
  output logic [31:0]       cycles_o
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state_q;

  logic [PC_W-1:0]   slot_q;
  logic [ITER_W-1:0] fetch_iter_q;
  logic              f_last, exec_last_q;
  logic [$clog2(DRAIN+1)-1:0] drain_q;

  assign f_last        = ({1'b0, slot_q} == prog_len_i - 1'b1);
  assign ucode_re_o    = (state_q == S_RUN);
  assign ucode_raddr_o = pc_start_i + slot_q;
  assign iter_clear_o  = (state_q == S_IDLE) && start_i;
  assign iter_step_o   = exec_valid_o && exec_last_q;
  assign busy_o        = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      slot_q       <= '0;
      fetch_iter_q <= '0;
      exec_valid_o <= 1'b0;
      exec_last_q  <= 1'b0;
      drain_q      <= '0;
      done_o       <= 1'b0;
      bank_sel_o   <= 1'b0;
      iter_idx_o   <= '0;
      cycles_o     <= '0;
    end else begin
      exec_valid_o <= ucode_re_o;
      exec_last_q  <= ucode_re_o && f_last;
      if (iter_step_o) iter_idx_o <= iter_idx_o + 1'b1;
      if (busy_o) cycles_o <= cycles_o + 1;

      unique case (state_q)
        S_IDLE: begin
          if (start_i) begin
            done_o       <= 1'b0;
            slot_q       <= '0;
            fetch_iter_q <= '0;
            iter_idx_o   <= '0;
            cycles_o     <= 32'd1;
            state_q      <= (iter_count_i == '0 || prog_len_i == '0) ? S_DRAIN : S_RUN;
            drain_q      <= '0;
          end else if (swap_i) begin
            bank_sel_o <= ~bank_sel_o;
          end
        end
        S_RUN: begin
          if (f_last) begin
            slot_q       <= '0;
            fetch_iter_q <= fetch_iter_q + 1'b1;
            if (fetch_iter_q == iter_count_i - 1'b1) state_q <= S_DRAIN;
          end else begin
            slot_q <= slot_q + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1'b1;
          if (drain_q == $bits(drain_q)'(DRAIN - 1)) begin
            state_q <= S_IDLE;
            done_o  <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
