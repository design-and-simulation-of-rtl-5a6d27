// survivor_metric_unit (SMU): traceback and output decision.
//
// Starting from a given state at the newest written survivor-memory word, the
// unit walks back one trellis step per clock. At each step it reads the
// decision word (asynchronous read), takes the decision bit d of the current
// state s and moves to the predecessor {s[K-3:0], d}. The decoded bit of a
// step is the MSB of its state, the most recent input bit of the encoder
// register; the other state bits are not used as output. Taking the state MSB
// as the output follows the description of this unit; the rest of the
// traceback arrangement is this design's choice.
//
// start loads start_state, start_addr (the newest word), n_steps (words to
// walk) and n_skip. The first n_skip steps give no output: they are the merge
// part of a sliding-window traceback, or the tail bits of a terminated frame.
// The bits of the remaining n_steps - n_skip steps are found newest first and
// stored in a reorder buffer so that they leave in time order.
//
// Timing: tracing takes n_steps cycles (busy high); trace_done pulses in the
// last of them. In the following n_steps - n_skip cycles out_valid is high and
// one decoded bit leaves per clock, oldest first; out_last marks the final bit
// when start was given with last_frame. The output has no back-pressure. A new
// start is accepted only when idle (neither tracing nor streaming).
module survivor_metric_unit #(
  parameter int unsigned K     = 9,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned NS   = 2 ** (K - 1),
  localparam int unsigned S_W  = K - 1,
  localparam int unsigned A_W  = $clog2(DEPTH),
  localparam int unsigned C_W  = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [S_W-1:0] start_state,
  input  logic [A_W-1:0] start_addr,
  input  logic [C_W-1:0] n_steps,
  input  logic [C_W-1:0] n_skip,
  input  logic           last_frame,
  output logic [A_W-1:0] rd_addr,
  input  logic [NS-1:0]  rd_data,
  output logic           busy,
  output logic           trace_done,
  output logic           idle,
  output logic           out_bit,
  output logic           out_valid,
  output logic           out_last
);

  logic [S_W-1:0]   state_q;
  logic [A_W-1:0]   addr_q;
  logic [C_W-1:0]   k_q, n_steps_q, n_skip_q, n_out_q, sidx_q;
  logic             last_q;
  logic             streaming_q;
  logic [DEPTH-1:0] obuf_q;
  logic             d;

  assign rd_addr    = addr_q;
  assign d          = rd_data[state_q];
  assign idle       = !busy && !streaming_q;
  assign trace_done = busy && (k_q == n_steps_q - 1'b1);
  assign out_valid  = streaming_q;
  assign out_bit    = obuf_q[sidx_q[A_W-1:0]];
  assign out_last   = streaming_q && last_q && (sidx_q == n_out_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      streaming_q <= 1'b0;
      state_q     <= '0;
      addr_q      <= '0;
      k_q         <= '0;
      n_steps_q   <= '0;
      n_skip_q    <= '0;
      n_out_q     <= '0;
      sidx_q      <= '0;
      last_q      <= 1'b0;
      obuf_q      <= '0;
    end else begin
      if (start && idle && n_steps != '0) begin
        busy      <= 1'b1;
        state_q   <= start_state;
        addr_q    <= start_addr;
        k_q       <= '0;
        n_steps_q <= n_steps;
        n_skip_q  <= n_skip;
        last_q    <= last_frame;
      end else if (busy) begin
        if (k_q >= n_skip_q)
          obuf_q[A_W'(n_steps_q - 1'b1 - k_q)] <= state_q[S_W-1];
        state_q <= {state_q[S_W-2:0], d};
        addr_q  <= addr_q - 1'b1;        // DEPTH is a power of two
        k_q     <= k_q + 1'b1;
        if (trace_done) begin
          busy <= 1'b0;
          if (n_steps_q > n_skip_q) begin
            streaming_q <= 1'b1;
            n_out_q     <= n_steps_q - n_skip_q;
            sidx_q      <= '0;
          end
        end
      end
      if (streaming_q) begin
        sidx_q <= sidx_q + 1'b1;
        if (sidx_q == n_out_q - 1'b1) streaming_q <= 1'b0;
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> idle);

endmodule
