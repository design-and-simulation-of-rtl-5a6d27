// conv_encoder: rate 1/2 convolutional encoder, constraint length K (9).
//
// An 8-stage shift register holds the last K-1 input bits and two modulo-2
// adders, one per generator polynomial, form the two code bits of each input
// bit. The register starts at zero after reset and again at the start of every
// frame, as the encoder is described to start from the all-zero state.
//
// Interface: information bits arrive on in_bit/in_valid/in_ready, with in_last
// on the final bit of a frame. Code symbols {c0, c1} leave on
// out_sym/out_valid/out_ready, out_last on the frame's final symbol. The
// output is registered: a bit accepted in one cycle gives its symbol in the
// next, one symbol per clock when out_ready stays high.
//
// Frame termination (TERMINATE = 1) is this design's choice: after the last
// information bit the encoder appends K-1 zero bits so that the trellis ends
// in state 0, which lets the decoder trace back from a known state. While it
// sends these tail symbols in_ready is low. With TERMINATE = 0 the frame ends
// with the symbol of the last information bit.
module conv_encoder
  import vit_pkg::*;
#(
  parameter int unsigned K         = K_DEFAULT,   // 3 to 9
  parameter logic [8:0]  G0        = G0_DEFAULT,
  parameter logic [8:0]  G1        = G1_DEFAULT,
  parameter bit          TERMINATE = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_bit,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  output logic [1:0] out_sym,
  output logic       out_valid,
  output logic       out_last,
  input  logic       out_ready
);

  localparam int unsigned M = K - 1;   // memory stages

  logic [M-1:0]         state_q;
  logic [$clog2(K)-1:0] tail_q;        // tail symbols still to send

  logic       load;
  logic       u;
  logic [K-1:0] regv;

  assign load     = !out_valid || out_ready;
  assign in_ready = (tail_q == '0) && load;
  assign u        = (tail_q != '0) ? 1'b0 : in_bit;
  assign regv     = {u, state_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '0;
      tail_q    <= '0;
      out_sym   <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else if (load) begin
      if (tail_q != '0) begin
        out_sym   <= {^(regv & G0[K-1:0]), ^(regv & G1[K-1:0])};
        out_valid <= 1'b1;
        out_last  <= (tail_q == 1);
        state_q   <= {1'b0, state_q[M-1:1]};
        tail_q    <= tail_q - 1'b1;
      end else if (in_valid) begin
        out_sym   <= {^(regv & G0[K-1:0]), ^(regv & G1[K-1:0])};
        out_valid <= 1'b1;
        if (in_last && TERMINATE) begin
          out_last <= 1'b0;
          tail_q   <= $clog2(K)'(M);
          state_q  <= {u, state_q[M-1:1]};
        end else if (in_last) begin
          out_last <= 1'b1;
          state_q  <= '0;            // next frame starts from state 0
        end else begin
          out_last <= 1'b0;
          state_q  <= {u, state_q[M-1:1]};
        end
      end else begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
      end
    end
  end

  // A symbol on offer stays unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_sym) && $stable(out_last));

endmodule
