// decoder_ctrl: control of the FM-PGDBF decoder.
//
// A frame is decoded as follows. start (accepted only while ready) makes the
// VNUs capture the channel word (load) and moves to RUN. In RUN the controller
// inspects the syndrome, i.e. the M check values computed from the current
// decisions, every cycle:
//   * all checks satisfied   -> the frame is decoded, go to IDLE with
//                               done = 1 and success = 1;
//   * It_max iterations done -> give up, done = 1 and success = 0;
//   * otherwise              -> iter = 1: every VNU applies its flip rule,
//                               the threshold index and the random
//                               generator advance, the counter counts.
// One iteration therefore takes exactly one clock cycle (n_c = 1), and a frame
// that needs k iterations is reported k+1 cycles after the start cycle.
// done is a one-cycle pulse; success and iters stay valid until the next start.
// The zero-syndrome detector is the M-input OR inside this block.
// The stop conditions (all checks satisfied, or It_max = 300 iterations) and
// the one-cycle iteration follow the published decoder; the start/ready/done
// handshake, the extra cycle for the final syndrome check and the reset
// behaviour are this design's own choices.
module decoder_ctrl #(
  parameter int unsigned M      = 648,   // number of check nodes
  parameter int unsigned IT_MAX = 300,   // maximum number of iterations
  localparam int unsigned ITW   = $clog2(IT_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [M-1:0]   syndrome,   // check values of the current decisions
  output logic           ready,      // idle, start is accepted
  output logic           load,       // VNUs capture the channel word
  output logic           iter,       // run one iteration this cycle
  output logic           done,       // frame finished (one-cycle pulse)
  output logic           success,    // the final decisions satisfy all checks
  output logic [ITW-1:0] iters       // iterations performed on the frame
);
  typedef enum logic {IDLE, RUN} state_e;
  state_e state;

  logic syn_zero;
  always_comb syn_zero = ~|syndrome;

  always_comb begin
    ready = (state == IDLE);
    load  = ready && start;
    iter  = (state == RUN) && !syn_zero && (iters != ITW'(IT_MAX));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      done    <= 1'b0;
      success <= 1'b0;
      iters   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state   <= RUN;
          iters   <= '0;
          success <= 1'b0;
        end
        RUN: begin
          if (syn_zero || iters == ITW'(IT_MAX)) begin
            state   <= IDLE;
            done    <= 1'b1;
            success <= syn_zero;
          end else begin
            iters   <= iters + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A start is never given while a frame is being decoded.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("decoder_ctrl: start while busy");
endmodule
