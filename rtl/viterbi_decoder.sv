// viterbi_decoder: Viterbi decoder for the rate 1/2, K = 9 convolutional code,
// using the traceback method.
//
// Datapath (per received symbol, one per clock): the branch metric unit turns
// the received pair into four branch metrics, the 256 ACS cells update the 256
// state metrics and emit a 256-bit decision word, and that word is written
// into the survivor memory (64 words, twice the traceback length of 32). The
// survivor metric unit (SMU) traces back through the memory and puts out the
// decoded bits. This split into BMU, ACS, survivor memory and SMU, the 256
// parallel states and the 64-word dual-port memory follow the described
// decoder; the controller below is this design's own.
//
// Controller (sliding-window traceback with a stall):
//  * ACCEPT: in_ready is high; each accepted symbol advances the trellis and
//    fills one memory word. When the memory holds 2 x TB_LEN undecoded words,
//    or when the symbol carries in_last, the controller stops accepting.
//  * TB_WAIT: waits until the SMU has finished sending earlier bits, then
//    starts a traceback over all stored words. In a normal window it starts
//    from the state with the smallest metric, skips the TB_LEN newest steps
//    (merge length) and decodes the TB_LEN oldest ones, which frees them. At
//    the end of a frame (in_last) it decodes everything still stored; with
//    TERMINATED = 1 the frame is known to end in state 0 (the encoder appended
//    K-1 zero tail bits), so the traceback starts from state 0 and drops the
//    K-1 tail bits, and the state metrics are reset for the next frame.
//  * TRACE: one traceback step per clock, in_ready low.
//
// Timing: a normal window stalls the input for 2 x TB_LEN + 1 cycles after
// every TB_LEN symbols (except the first window, which needs 2 x TB_LEN
// symbols). The decoded bits of a window leave one per clock right after its
// traceback, while new symbols are already being accepted. out_last marks the
// last information bit of a frame. There is no output back-pressure.
module viterbi_decoder
  import vit_pkg::*;
#(
  parameter int unsigned K          = K_DEFAULT,
  parameter logic [8:0]  G0         = G0_DEFAULT,
  parameter logic [8:0]  G1         = G1_DEFAULT,
  parameter int unsigned SOFT_BITS  = 1,
  parameter int unsigned PM_W       = SOFT_BITS + 7,   // state-metric width, see acs_array
  parameter int unsigned TB_LEN     = TB_LEN_DEFAULT,
  parameter bit          TERMINATED = 1'b1,
  localparam int unsigned NS        = 2 ** (K - 1),
  localparam int unsigned DEPTH     = 2 * TB_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SOFT_BITS-1:0] in_r0,     // received value of code bit c0
  input  logic [SOFT_BITS-1:0] in_r1,     // received value of code bit c1
  input  logic                 in_valid,
  input  logic                 in_last,
  output logic                 in_ready,
  output logic                 out_bit,
  output logic                 out_valid,
  output logic                 out_last
);

  localparam int unsigned BM_W = SOFT_BITS + 1;
  localparam int unsigned S_W  = K - 1;
  localparam int unsigned A_W  = $clog2(DEPTH);
  localparam int unsigned C_W  = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {ACCEPT, TB_WAIT, TRACE} ctrl_state_e;

  ctrl_state_e     st_q;
  logic [C_W-1:0]  fill_q;
  logic [A_W-1:0]  wr_ptr_q;
  logic            flush_q;

  logic [BM_W-1:0] bm [4];
  logic [PM_W-1:0] pm [NS];
  logic [NS-1:0]   dec;
  logic [S_W-1:0]  best;
  logic [A_W-1:0]  rd_addr;
  logic [NS-1:0]   rd_data;
  logic            tb_done, tb_idle;

  logic            accept, tb_start, acs_init;
  logic [S_W-1:0]  tb_state;
  logic [C_W-1:0]  tb_skip;

  assign in_ready = (st_q == ACCEPT);
  assign accept   = in_valid && in_ready;
  assign tb_start = (st_q == TB_WAIT) && tb_idle;
  assign tb_state = (flush_q && TERMINATED) ? '0 : best;
  assign tb_skip  = !flush_q   ? C_W'(TB_LEN) :
                    TERMINATED ? C_W'(K - 1)  : '0;
  assign acs_init = (st_q == TRACE) && tb_done && flush_q;

  branch_metric_unit #(.SOFT_BITS(SOFT_BITS)) u_bmu (
    .r0(in_r0), .r1(in_r1), .bm(bm)
  );

  acs_array #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .BM_W(BM_W)) u_acs (
    .clk, .rst_n, .init(acs_init), .step(accept), .bm, .pm, .dec, .norm()
  );

  best_state_finder #(.NS(NS), .PM_W(PM_W)) u_best (
    .pm, .best, .best_pm()
  );

  survivor_memory #(.WIDTH(NS), .DEPTH(DEPTH)) u_mem (
    .clk, .we(accept), .waddr(wr_ptr_q), .wdata(dec), .raddr(rd_addr), .rdata(rd_data)
  );

  survivor_metric_unit #(.K(K), .DEPTH(DEPTH)) u_smu (
    .clk, .rst_n,
    .start      (tb_start),
    .start_state(tb_state),
    .start_addr (wr_ptr_q - 1'b1),
    .n_steps    (fill_q),
    .n_skip     (tb_skip),
    .last_frame (flush_q),
    .rd_addr, .rd_data,
    .busy       (),
    .trace_done (tb_done),
    .idle       (tb_idle),
    .out_bit, .out_valid, .out_last
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= ACCEPT;
      fill_q   <= '0;
      wr_ptr_q <= '0;
      flush_q  <= 1'b0;
    end else begin
      unique case (st_q)
        ACCEPT: if (accept) begin
          wr_ptr_q <= wr_ptr_q + 1'b1;
          fill_q   <= fill_q + 1'b1;
          if (in_last) begin
            flush_q <= 1'b1;
            st_q    <= TB_WAIT;
          end else if (fill_q == C_W'(DEPTH - 1)) begin
            flush_q <= 1'b0;
            st_q    <= TB_WAIT;
          end
        end
        TB_WAIT: if (tb_idle) st_q <= TRACE;
        TRACE: if (tb_done) begin
          fill_q <= flush_q ? '0 : C_W'(TB_LEN);
          st_q   <= ACCEPT;
        end
        default: st_q <= ACCEPT;
      endcase
    end
  end

  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n) fill_q <= C_W'(DEPTH));

endmodule
