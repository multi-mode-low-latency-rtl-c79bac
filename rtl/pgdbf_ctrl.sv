// pgdbf_ctrl: control of the PGDBF decoder.
//
// Two states. In IDLE the decoder accepts data: while load_data_in is high
// the node shift chains move one position per clock. A start pulse (with
// load_data_in low) latches max_iteration, clears the iteration counter and
// the status flags and enters RUN. In RUN every clock is one decoding
// iteration:
//   * syndrome zero        -> done = 1, back to IDLE (no flip);
//   * counter = max_iter   -> give_up = 1, back to IDLE (no flip);
//   * otherwise            -> update = 1 (every node may flip), counter + 1.
// So a word needing k flipping iterations raises done k+1 clocks after the
// start edge, with iteration = k. done / give_up stay high until the next
// start or load. start and load_data_in are ignored in RUN.
//
// gdbf_mode is high for the first GDBF_ITERS iterations (counter < GDBF_ITERS):
// the decoder then flips every maximum-energy node (plain GDBF) and only
// afterwards applies the random mask (PGDBF).
//
// The termination rules, the 8-bit iteration count and the GDBF-then-PGDBF
// schedule (10 GDBF iterations) follow the decoder description; the two-state
// FSM, latching max_iteration at start and the flag clearing are this
// design's own choices. Synchronous active-high reset.
module pgdbf_ctrl #(
  parameter int unsigned GDBF_ITERS = 10,
  localparam int unsigned IW = pgdbf_pkg::ITER_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load_data_in,
  input  logic          start,
  input  logic [IW-1:0] max_iteration,
  input  logic          syndrome_zero,  // all check nodes satisfied
  output logic          load,           // shift the node chains
  output logic          update,         // flip iteration this clock
  output logic          gdbf_mode,      // ignore the random mask
  output logic [IW-1:0] iteration,      // iterations performed so far
  output logic          done,
  output logic          give_up
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t        state;
  logic [IW-1:0] max_it_q;

  assign load      = (state == IDLE) && load_data_in;
  assign update    = (state == RUN) && !syndrome_zero && (iteration != max_it_q);
  assign gdbf_mode = (32'(iteration) < 32'(GDBF_ITERS));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      max_it_q  <= '0;
      iteration <= '0;
      done      <= 1'b0;
      give_up   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (load_data_in) begin
            done    <= 1'b0;
            give_up <= 1'b0;
          end else if (start) begin
            state     <= RUN;
            max_it_q  <= max_iteration;
            iteration <= '0;
            done      <= 1'b0;
            give_up   <= 1'b0;
          end
        end
        RUN: begin
          if (syndrome_zero) begin
            done  <= 1'b1;
            state <= IDLE;
          end else if (iteration == max_it_q) begin
            give_up <= 1'b1;
            state   <= IDLE;
          end else begin
            iteration <= iteration + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // done and give_up are never raised together.
  a_flags_exclusive: assert property (@(posedge clk) disable iff (rst) !(done && give_up));
  // Chains never shift while iterating.
  a_no_load_in_run: assert property (@(posedge clk) disable iff (rst) !(load && update));

endmodule
