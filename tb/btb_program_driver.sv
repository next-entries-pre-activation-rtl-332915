// btb_program_driver: testbench model of a fetch unit and execute stage
// running a small synthetic program against a drowsy BTB.
//
// The program (addresses in bytes, 4-byte instructions) has an if/else
// branch taken on alternate passes, an inner loop of 8 iterations, a
// data-dependent branch (taken about 30% of the time), two calls to one
// subroutine whose return is an indirect jump, a detour taken every 8th pass
// through five jumps that all map to one BTB set (forcing replacements), a
// 200-instruction straight block, and a jump back to the start.
//
// Each cycle the fetch model looks up the current PC. A stall keeps the PC.
// Otherwise the next PC is the predicted one (BTB hit and predicted taken:
// target; else PC+4); a wrong prediction costs two bubble cycles, after
// which fetch continues on the correct path. Every fetched branch is sent to
// the BTB update port two cycles later (execute stage).
//
// Checks made here: no hit on a PC that is not a branch; a branch that was
// inserted into a set holding no more branches than ways must hit or stall
// on every later lookup; hit targets equal the last taken target (except for
// the indirect return); hit directions follow an independent 2-bit model;
// a stall never lasts longer than the wake-up latency.
module btb_program_driver #(
  parameter int unsigned SETS     = 128,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned WAKE_LAT = 1,
  parameter int unsigned N_CYCLES = 20000
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              lookup_en,
  output logic [ADDR_W-1:0] lookup_pc,
  input  logic              hit,
  input  logic              stall,
  input  logic              pred_taken,
  input  logic [ADDR_W-1:0] target,
  output logic              upd_valid,
  output logic [ADDR_W-1:0] upd_pc,
  output logic              upd_taken,
  output logic [ADDR_W-1:0] upd_target,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_lookups,
  output int                n_hits,
  output int                n_stalls,
  output int                n_mispredicts,
  output int                n_branches,
  output longint            n_cycles
);

  typedef enum int {K_ALT, K_LOOP, K_RAND, K_CALL, K_RET, K_EVERY, K_ALWAYS} kind_t;
  typedef struct {
    kind_t       kind;
    logic [31:0] tgt;
    int          param;
    int          count;
  } br_t;

  br_t         prog [logic [31:0]];
  int          inserted [logic [31:0]];   // branch -> 1 once taken (in BTB)
  int          pstate [logic [31:0]];     // reference 2-bit state
  logic [31:0] last_tgt [logic [31:0]];
  int          set_pop [int];
  logic [31:0] ret_addr;
  int nxt [4][2] = '{'{0, 1}, '{0, 3}, '{0, 3}, '{2, 3}};

  // execute-stage queue: one update per fetched branch, two cycles later
  typedef struct {
    longint      due;
    logic [31:0] pc;
    logic        taken;
    logic [31:0] tgt;
  } upd_t;
  upd_t q [$];

  function automatic int set_of(logic [31:0] pc);
    return int'((pc >> 2) % SETS);
  endfunction

  task automatic add(logic [31:0] pc, kind_t k, logic [31:0] t, int p);
    br_t b;
    b.kind = k; b.tgt = t; b.param = p; b.count = 0;
    prog[pc] = b;
    if (set_pop.exists(set_of(pc))) set_pop[set_of(pc)]++;
    else set_pop[set_of(pc)] = 1;
  endtask

  task automatic chk(string what, logic ok, logic [31:0] pc);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc %h, cycle %0d", what, pc, n_cycles);
    end
  endtask

  // outcome of executing the branch at pc (advances its state)
  task automatic resolve(logic [31:0] pc, output logic tk, output logic [31:0] t);
    br_t b = prog[pc];
    t = b.tgt;
    case (b.kind)
      K_ALT:    tk = (b.count % 2) == 0;
      K_LOOP:   tk = (b.count % b.param) != b.param - 1;
      K_RAND:   tk = ($urandom % 100) < b.param;
      K_CALL:   begin tk = 1; ret_addr = pc + 4; end
      K_RET:    begin tk = 1; t = ret_addr; end
      K_EVERY:  tk = (b.count % b.param) == 0;
      default:  tk = 1;
    endcase
    b.count++;
    prog[pc] = b;
  endtask

  initial begin : run
    logic [31:0] pc;
    int          bubble, stall_run;
    checks = 0; failures = 0; n_lookups = 0; n_hits = 0; n_stalls = 0;
    n_mispredicts = 0; n_branches = 0; n_cycles = 0; done = 0;
    lookup_en = 0; lookup_pc = 0; upd_valid = 0; upd_pc = 0; upd_taken = 0; upd_target = 0;
    ret_addr = 0;
    add(32'h1018, K_ALT,    32'h1028, 0);
    add(32'h1044, K_LOOP,   32'h1030, 8);
    add(32'h1048, K_RAND,   32'h1054, 30);
    add(32'h1054, K_CALL,   32'h2000, 0);
    add(32'h1058, K_CALL,   32'h2000, 0);
    add(32'h105c, K_EVERY,  32'h3000, 8);
    add(32'h1380, K_ALWAYS, 32'h1000, 0);
    add(32'h2010, K_RET,    32'h0,    0);
    add(32'h3000, K_ALWAYS, 32'h3200, 0);
    add(32'h3200, K_ALWAYS, 32'h3400, 0);
    add(32'h3400, K_ALWAYS, 32'h3600, 0);
    add(32'h3600, K_ALWAYS, 32'h3800, 0);
    add(32'h3800, K_ALWAYS, 32'h1060, 0);
    pc = 32'h1000; bubble = 0; stall_run = 0;
    @(posedge rst_n);
    while (n_cycles < longint'(N_CYCLES)) begin
      logic        is_br, tk, ptk;
      logic [31:0] t, pnext, anext;
      @(negedge clk);
      n_cycles++;
      // execute stage
      upd_valid = 0;
      if (q.size() > 0 && q[0].due <= n_cycles) begin
        upd_t u;
        u = q.pop_front();
        upd_valid = 1; upd_pc = ADDR_W'(u.pc); upd_taken = u.taken; upd_target = ADDR_W'(u.tgt);
        if (u.taken && !inserted.exists(u.pc)) begin
          inserted[u.pc] = 1; pstate[u.pc] = 2;
        end else if (inserted.exists(u.pc)) begin
          pstate[u.pc] = nxt[pstate[u.pc]][u.taken];
        end
        if (u.taken) last_tgt[u.pc] = u.tgt;
      end
      // fetch stage
      if (bubble > 0) begin
        lookup_en = 0; bubble--;
        #1;
        continue;
      end
      lookup_en = 1; lookup_pc = ADDR_W'(pc);
      n_lookups++;
      #1;
      is_br = prog.exists(pc);
      if (stall) begin
        n_stalls++; stall_run++;
        chk("stall longer than the wake-up latency", stall_run <= int'(WAKE_LAT), pc);
        chk("stall on a non-branch", is_br, pc);
        continue;
      end
      stall_run = 0;
      if (hit) n_hits++;
      chk("hit on a non-branch", !hit || is_br, pc);
      if (is_br && inserted.exists(pc) && set_pop[set_of(pc)] <= int'(WAYS)) begin
        chk("resident branch missed", hit, pc);
        if (hit) begin
          chk("predicted direction", pred_taken == (pstate[pc] >= 2), pc);
          if (prog[pc].kind != K_RET) chk("predicted target", 32'(target) == last_tgt[pc], pc);
        end
      end
      ptk   = hit && pred_taken;
      pnext = ptk ? 32'(target) : pc + 4;
      if (is_br) begin
        upd_t u;
        n_branches++;
        resolve(pc, tk, t);
        anext = tk ? t : pc + 4;
        u.due = n_cycles + 2; u.pc = pc; u.taken = tk; u.tgt = t;
        q.push_back(u);
      end else begin
        anext = pc + 4;
      end
      if (pnext != anext) begin
        n_mispredicts++;
        bubble = 2;
      end
      pc = anext;
    end
    @(negedge clk);
    lookup_en = 0; upd_valid = 0;
    done = 1;
  end

endmodule
