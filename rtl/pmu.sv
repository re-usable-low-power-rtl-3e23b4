// pmu: power management unit of the DSP core.
//
// Two states, AWAKE and SLEEP. The PMU is the only part of the IP that
// keeps its clock while the IP sleeps, so it can react to wakeup. Its
// single control output clk_en drives the gated clock circuitry; sleep
// goes out of the IP to the bus bridge.
//
// From the document: the inputs sleepmode and entersleepmode from the
// register block tell whether and when to sleep, the DMU's active flag
// says whether the core is still busy, and an asserted wakeup ends sleep.
// This design's reading of those signals: sleepmode is a level that
// allows sleeping; entersleepmode arrives as a toggle (each request flips
// it) and is held as a pending request until the core is idle; with
// sleepmode low a request is dropped. The IP falls asleep on the clock
// after sleepmode && request && !active and wakes on the clock after
// wakeup is seen high.
module pmu (
  input  logic clk,            // free running system bus clock
  input  logic rst_n,
  input  logic sleepmode,      // sleeping allowed
  input  logic esm_tgl,        // entersleepmode request (toggle)
  input  logic active,         // DMU is busy
  input  logic wakeup,         // select from the bus bridge
  output logic clk_en,         // to the gated clock circuitry
  output logic sleep           // the IP is asleep
);

  typedef enum logic {AWAKE, SLEEP} pmu_state_e;
  pmu_state_e state;
  logic       esm_seen, pend, req;

  assign req    = pend || (esm_tgl != esm_seen);
  assign sleep  = (state == SLEEP);
  assign clk_en = (state == AWAKE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= AWAKE;
      esm_seen <= 1'b0;
      pend     <= 1'b0;
    end else begin
      esm_seen <= esm_tgl;
      unique case (state)
        AWAKE: begin
          if (!sleepmode) begin
            pend <= 1'b0;
          end else if (req && !active) begin
            pend  <= 1'b0;
            state <= SLEEP;
          end else begin
            pend <= req;
          end
        end
        SLEEP: if (wakeup) state <= AWAKE;
        default: state <= AWAKE;
      endcase
    end
  end

endmodule
