// bsin: synchronization block of the modular squaring devices. It turns a
// start request into the sequence of register strobes of one operation and
// raises End of operation when its subtracting counter reaches zero.
//
// Operation: in IDLE a `start` pulse produces `load` in the same cycle (the
// datapath loads RgA1, RgA2, RgP and clears RgR) and the counter Count takes
// the binary shift number code `shift_code`. In RUN, every clock is a step:
// `step` is high, the datapath writes the new residue into RgR and shifts
// RgA2, and Count decrements. The step taken with Count = 0 is the last one;
// the next cycle `done` (End of operation) is high for one clock and the
// block is back in IDLE. One operation therefore takes shift_code + 1 steps
// after the load cycle. `start` while busy is ignored.
//
// The counter and the End-of-operation output follow the device description.
// The delay lines of the original asynchronous timing chain are replaced by
// the clock; the two-state machine, the one-cycle `done` pulse and the
// asynchronous active-low reset are choices of this design.
module bsin #(
  parameter int unsigned CW = 3  // counter width in bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] shift_code,  // number of shifts, loaded at start
  output logic          load,        // load operands, clear RgR
  output logic          step,        // one multiplier digit per clock
  output logic          busy,
  output logic          done         // End of operation, one-cycle pulse
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t        state;
  logic [CW-1:0] count;

  assign load = start && (state == IDLE);
  assign step = (state == RUN);
  assign busy = (state == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          count <= shift_code;
          state <= RUN;
        end
        RUN: begin
          if (count == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            count <= count - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
