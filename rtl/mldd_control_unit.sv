// mldd_control_unit: control logic of the majority logic detector/decoder.
//
// It decides, in the first three decoding cycles, whether the word read from
// memory holds an error, and sequences the shift register.
//   - OR1 merges the check sums B1..B4 of the current cycle into one bit.
//   - Two detection registers in series keep OR1 of the two previous cycles.
//   - OR2 merges OR1 of the current (third) cycle with both registers, so in
//     the third cycle it tells whether any check sum was 1 in cycles 1..3.
//   - A counter counts the decoding cycles; the FSM clears it and the
//     detection registers when a new word is loaded.
//   - The FSM raises finish after the third cycle if OR2 is 0 (error-free
//     word). Otherwise it flags error_detected and keeps the register rotating
//     until DET_CYCLES + N rotations are done, then raises finish.
//
// Timing (cycle of start = 1): detection in cycles 2..4, finish in cycle 5 for
// an error-free word, in cycle N + 5 when an error was detected. finish lasts
// one cycle and ready is high only in IDLE; start must only come with ready.
// Counting on after detection, rather than restarting the count, keeps the
// rotation total at DET_CYCLES + N in both cases so that the output taps need
// no multiplexer; finish ending the decoding of a faulty word is this design's
// reading of the flow diagram's end condition k = N + 3.
module mldd_control_unit
  import mldd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,           // word loaded into the shift register this cycle
  input  checks_t b,               // check sums of the current taps
  output logic    shift,           // rotate/correct the shift register
  output logic    finish,          // word is on the output this cycle
  output logic    error_detected,  // the current word had a check sum at 1
  output logic    ready            // idle, start accepted
);

  typedef enum logic [1:0] {IDLE, DETECT, DECODE, DONE} state_t;

  state_t state, state_nxt;
  logic   or1, or2;
  logic   det_reg1, det_reg2;  // OR1 of the previous and of the one before
  logic   clear;               // FSM: reset counter and detection registers
  logic   err_set;
  count_t count;               // decoding cycle counter

  assign or1 = |b;
  assign or2 = or1 | det_reg1 | det_reg2;

  always_comb begin
    state_nxt = state;
    clear     = 1'b0;
    err_set   = 1'b0;
    unique case (state)
      IDLE:   if (start) begin
                state_nxt = DETECT;
                clear     = 1'b1;
              end
      DETECT: if (count == count_t'(DET_CYCLES - 1)) begin
                if (or2) begin
                  state_nxt = DECODE;
                  err_set   = 1'b1;
                end else begin
                  state_nxt = DONE;
                end
              end
      DECODE: if (count == count_t'(DET_CYCLES + N - 1)) state_nxt = DONE;
      DONE:   state_nxt = IDLE;
      default: state_nxt = IDLE;
    endcase
  end

  assign shift  = (state == DETECT) || (state == DECODE);
  assign finish = (state == DONE);
  assign ready  = (state == IDLE);

  // FSM state and error flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= IDLE;
      error_detected <= 1'b0;
    end else begin
      state <= state_nxt;
      if (clear)        error_detected <= 1'b0;
      else if (err_set) error_detected <= 1'b1;
    end
  end

  // counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (shift) count <= count + 1'b1;
  end

  // detection registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_reg1 <= 1'b0;
      det_reg2 <= 1'b0;
    end else if (clear) begin
      det_reg1 <= 1'b0;
      det_reg2 <= 1'b0;
    end else if (state == DETECT) begin
      det_reg1 <= or1;
      det_reg2 <= det_reg1;
    end
  end

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready)
    else $error("start while the decoder is busy");

  a_finish_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    finish |=> !finish);

endmodule
