// decay_ctrl: deactivation controller using the decay policy.
//
// A global counter wraps every GLOBAL_INTERVAL cycles and emits a tick. Each
// entry has a local counter that is cleared when the entry is touched
// (accessed, woken or pre-activated) and that advances by one on every global
// tick until it saturates at LOCAL_MAX = DECAY_INTERVAL / GLOBAL_INTERVAL.
// While a local counter sits at its maximum the entry's deactivation output
// is high, so an entry left idle goes drowsy between
// DECAY_INTERVAL - GLOBAL_INTERVAL + 1 and DECAY_INTERVAL cycles after its
// last touch. The decay interval of 128 cycles is the value found best in the
// evaluation; the global interval and the counter width are this design's
// own choices: by default the global interval is a quarter of the decay
// interval, so four global ticks of idleness put an entry to sleep.
//
// Timing: touch_i is sampled on the rising edge; deact_o is a registered
// level and drops the cycle after a touch.
module decay_ctrl #(
  parameter int unsigned ENTRIES         = 512,
  parameter int unsigned DECAY_INTERVAL  = 128,
  parameter int unsigned GLOBAL_INTERVAL = DECAY_INTERVAL / 4,
  localparam int unsigned LOCAL_MAX = DECAY_INTERVAL / GLOBAL_INTERVAL,
  localparam int unsigned LOCAL_W   = $clog2(LOCAL_MAX + 1),
  localparam int unsigned GLOB_W    = (GLOBAL_INTERVAL > 1) ? $clog2(GLOBAL_INTERVAL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] touch_i,   // entry accessed / woken this cycle
  output logic               tick_o,    // global interval reached this cycle
  output logic [ENTRIES-1:0] deact_o    // deactivation request per entry
);

  logic [GLOB_W-1:0]  gcnt;
  logic [LOCAL_W-1:0] lcnt [ENTRIES];

  assign tick_o = (gcnt == GLOB_W'(GLOBAL_INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gcnt <= '0;
    else        gcnt <= tick_o ? '0 : gcnt + GLOB_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) lcnt[i] <= '0;
    end else begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        if (touch_i[i])
          lcnt[i] <= '0;
        else if (tick_o && lcnt[i] != LOCAL_W'(LOCAL_MAX))
          lcnt[i] <= lcnt[i] + LOCAL_W'(1);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++)
      deact_o[i] = (lcnt[i] == LOCAL_W'(LOCAL_MAX));
  end

  initial begin
    assert (GLOBAL_INTERVAL >= 1 && DECAY_INTERVAL >= GLOBAL_INTERVAL)
      else $error("decay_ctrl: need 1 <= GLOBAL_INTERVAL <= DECAY_INTERVAL");
  end

endmodule
