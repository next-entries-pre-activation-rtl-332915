// power_mode_ctrl: power mode controller of the drowsy BTB (and of the NBET
// rows, which share the BTB rows' modes).
//
// Every entry has a mode: ACTIVE (full supply, accessible), DROWSY (low
// supply, contents kept, not accessible) or WAKING (supply ramping up). The
// DROWSY state stands for the set drowsy bit that switches the row to the low
// supply. A deactivation request puts an ACTIVE entry to sleep. A
// pre-activation request or an on-demand wake request starts the wake-up of a
// DROWSY entry; it becomes ACTIVE WAKE_LAT cycles after the request is seen
// (one cycle by default, the latency the evaluation assumes). A wake request
// has priority over a deactivation in the same cycle, and a WAKING entry
// ignores deactivation.
//
// Timing: requests are sampled on the rising clock edge; active_o follows
// the new mode from the next cycle. wake_start_o pulses (combinationally) in
// the cycle a wake-up of a drowsy entry is requested, so that mode
// transitions can be counted. All entries are ACTIVE after reset; that reset
// state is this design's choice.
module power_mode_ctrl
  import btb_pkg::*;
#(
  parameter int unsigned ENTRIES  = 512,
  parameter int unsigned WAKE_LAT = 1      // wake-up latency in cycles, >= 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] deact_i,       // put entry into drowsy mode
  input  logic [ENTRIES-1:0] preact_i,      // pre-activation from the NBET
  input  logic [ENTRIES-1:0] wake_i,        // on-demand wake-up (access to a drowsy row)
  output logic [ENTRIES-1:0] active_o,      // entry accessible this cycle
  output logic [ENTRIES-1:0] drowsy_o,      // entry on the low supply this cycle
  output logic [ENTRIES-1:0] wake_start_o   // drowsy->active transition starts
);

  localparam int unsigned CNT_W = $clog2(WAKE_LAT + 1);

  pmode_t           mode [ENTRIES];
  logic [CNT_W-1:0] cnt  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        mode[i] <= PM_ACTIVE;
        cnt[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        unique case (mode[i])
          PM_ACTIVE: begin
            if (deact_i[i] && !preact_i[i] && !wake_i[i]) mode[i] <= PM_DROWSY;
          end
          PM_DROWSY: begin
            if (preact_i[i] || wake_i[i]) begin
              if (WAKE_LAT <= 1) begin
                mode[i] <= PM_ACTIVE;
              end else begin
                mode[i] <= PM_WAKING;
                cnt[i]  <= CNT_W'(WAKE_LAT - 1);
              end
            end
          end
          PM_WAKING: begin
            if (cnt[i] == CNT_W'(1)) mode[i] <= PM_ACTIVE;
            else                     cnt[i]  <= cnt[i] - CNT_W'(1);
          end
          default: mode[i] <= PM_ACTIVE;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++) active_o[i] = (mode[i] == PM_ACTIVE);
  end

  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++) drowsy_o[i] = (mode[i] == PM_DROWSY);
  end

  // depends on the requests, kept apart from active_o so that the lookup's
  // active_o -> stall -> wake_i path is not a loop
  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++)
      wake_start_o[i] = (mode[i] == PM_DROWSY) && (preact_i[i] || wake_i[i]);
  end

endmodule
