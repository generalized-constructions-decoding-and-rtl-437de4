// Decoder sequencer.
//
// A start pulse while idle raises INIT for one cycle (belief banks load the
// channel LLRs, message banks clear), then keeps the shift enable high for
// ITER iterations of P cycles each; one iteration is P cycles because every
// super processor steps through the P check rows of its circulants. There is
// no syndrome check: the iteration count is fixed, as the source design
// suggests for horizontal partitioning. done pulses for one cycle after the
// last iteration, and the decoder then holds its state until the next start.
// Latency from start to done: 1 + P*ITER cycles. The state encoding, reset
// and handshake are this design's choices.
module decoder_ctrl #(
  parameter int P    = 44,
  parameter int ITER = 10
) (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic start,
  output logic init,
  output logic en,
  output logic busy,
  output logic done,
  output logic [$clog2(P)-1:0]      cycle,   // check-row step inside the iteration
  output logic [$clog2(ITER+1)-1:0] iter     // iterations completed
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN} state_t;
  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cycle <= '0;
      iter  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= LOAD;
        LOAD: begin
          state <= RUN;
          cycle <= '0;
          iter  <= '0;
        end
        RUN: begin
          if (int'(cycle) == P - 1) begin
            cycle <= '0;
            iter  <= iter + 1'b1;
            if (int'(iter) == ITER - 1) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end else begin
            cycle <= cycle + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign init = (state == LOAD);
  assign en   = (state == RUN);
  assign busy = (state != IDLE);

  initial assert (P >= 2 && ITER >= 1) else $error("decoder_ctrl: bad parameters");
endmodule
