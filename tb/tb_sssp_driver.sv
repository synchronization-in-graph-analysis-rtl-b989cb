// tb_sssp_driver: behavioural model of the worker threads and the message
// fabric, used to run single-source shortest path (SSSP) on td_system.
//
// Every hardware thread hosts one graph vertex. The graph is a 2D grid with
// 4-connected neighbours plus CHORDS random long-range edges (undirected);
// edge weights are 1, or random in 1..4 for weighted runs. Vertex 0 is the
// source. The vertex behaviour is the node-level event-based SSSP:
//   init   source: dist = 0 and ready to send; others: dist = infinity;
//   recv   if m + w < dist: dist = m + w, then (async) ready to send or
//          (sync) mark changed;
//   send   message = dist, clear changed and ready; the message goes to
//          every neighbour, one packet per cycle per core;
//   step   (on a barrier release that returns 1) async: return false;
//          sync: if changed, become ready and return true, else false;
//   finish (barrier returns 2, i.e. every vertex's last step said false).
// A thread calls the barrier, voting "true" when its last step returned
// false, whenever it has nothing to receive and nothing to send. Each core
// does at most one receive and one send per cycle, receives first. Sends
// are held while send_en of the FPGA is low. Packets reach the destination
// mailbox after a random 1..MAXD cycles; the core's receive pulse is given
// when the thread takes the packet from the mailbox.
//
// Checks: final distances equal an independent shortest-path solution;
// at every release no packet is in flight or waiting and every thread is
// blocked; release comes within a bound after the system became quiet;
// every mechanism (message wake-up, step release, finish release, black
// refutation, count refutation, token held by an active FPGA, send held by
// send_en) occurs when REQUIRE_ALL is set. Prints TB_RESULT and ends the
// simulation; a watchdog stops it after WATCHDOG cycles.
module tb_sssp_driver
  import td_pkg::*;
#(
  parameter int unsigned N_FPGA       = 3,
  parameter int unsigned CORES        = 4,
  parameter int unsigned THREADS      = 2,
  parameter int unsigned LINK_LATENCY = 10,
  parameter int unsigned MAXD         = 40,
  parameter int unsigned CHORDS       = 3,
  parameter int unsigned RUNS         = 15,  // bit0 sync, bit1 async, bit2 sync weighted, bit3 async weighted
  parameter bit          REQUIRE_ALL  = 1'b1,
  parameter int unsigned WATCHDOG     = 200000
) (
  input  logic                                           clk,
  output logic                                           rst_n,
  output logic                                           enable,
  output logic [N_FPGA-1:0][CORES-1:0]                   send_pulse,
  output logic [N_FPGA-1:0][CORES-1:0]                   recv_pulse,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      bar_call,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      bar_vote,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      msg_avail,
  input  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      ret_valid,
  input  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0][1:0] ret_val,
  input  logic [N_FPGA-1:0]                              send_en,
  input  td_status_t                                     status
);
  localparam int NC    = N_FPGA * CORES;
  localparam int NT    = NC * THREADS;
  localparam int WHEEL = MAXD + 2;
  localparam int INF   = 32'h3fffffff;
  localparam int DEPTH = (CORES <= 1) ? 1 : $clog2(CORES);
  localparam int BOUND = 3 * (2 * LINK_LATENCY + DEPTH + 8) + LINK_LATENCY + 8;

  typedef enum int {T_RUN, T_BLOCKED, T_DONE} tstate_e;

  // Per-core copies of the port vectors. The model works on these with
  // variable indices; the ports are wired to them slice by slice below.
  logic [THREADS-1:0]      call_c [NC], vote_c [NC], avail_c [NC], retv_c [NC];
  logic [THREADS-1:0][1:0] retval_c [NC];
  logic [CORES-1:0]        sp_f [N_FPGA], rp_f [N_FPGA];

  for (genvar f = 0; f < int'(N_FPGA); f++) begin : g_f
    assign send_pulse[f] = sp_f[f];
    assign recv_pulse[f] = rp_f[f];
    for (genvar c = 0; c < int'(CORES); c++) begin : g_c
      assign bar_call[f][c]  = call_c[f * CORES + c];
      assign bar_vote[f][c]  = vote_c[f * CORES + c];
      assign msg_avail[f][c] = avail_c[f * CORES + c];
      assign retv_c[f * CORES + c]   = ret_valid[f][c];
      assign retval_c[f * CORES + c] = ret_val[f][c];
    end
  end

  task automatic clear_drive(bit with_avail);
    for (int c = 0; c < NC; c++) begin
      call_c[c] = '0; vote_c[c] = '0;
      if (with_avail) avail_c[c] = '0;
    end
    for (int f = 0; f < int'(N_FPGA); f++) begin sp_f[f] = '0; rp_f[f] = '0; end
  endtask
  typedef struct { int dst; int val; } pkt_t;

  int checks = 0, failures = 0;
  int cycle = 0;

  // graph (CSR, both directions stored)
  int adj_off [NT+1];
  int adj_dst [$];
  int adj_w   [$];
  int ref_dist [NT];

  // vertex state
  int      vdist [NT];
  bit      changed [NT], ready [NT], last_step [NT];
  int      out_idx [NT];   // next edge to send, -1 when not sending
  int      out_val [NT];
  tstate_e st [NT];
  int      mbox [NT][$];

  pkt_t wheel [WHEEL][$];
  int   inflight = 0, waiting = 0, n_blocked = 0, n_done = 0;
  int   quiet_start = -1;
  int   rr_recv [NC], rr_send [NC];

  // mechanism counters
  int n_wake = 0, n_step = 0, n_finish = 0, n_stall = 0, n_long = 0, n_releases = 0;
  int lat_max = 0;
  int tot_black = 0, tot_count = 0, tot_rounds = 0;
  int tok_start = 0;
  bit async_mode, weighted;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  function automatic int tid(int g); return g % THREADS; endfunction

  // ---- graph construction and reference solution ----
  task automatic build_graph(bit wtd);
    int w_cols, h_rows;
    int es [$], ed [$], ew [$];
    w_cols = 1;
    while (w_cols * w_cols < NT) w_cols++;
    h_rows = (NT + w_cols - 1) / w_cols;
    for (int v = 0; v < NT; v++) begin
      int x = v % w_cols, y = v / w_cols;
      if (x + 1 < w_cols && v + 1 < NT) begin es.push_back(v); ed.push_back(v + 1); end
      if (y + 1 < h_rows && v + w_cols < NT) begin es.push_back(v); ed.push_back(v + w_cols); end
    end
    for (int k = 0; k < int'(CHORDS); k++) begin
      int a = $urandom % NT, b = $urandom % NT;
      if (a != b) begin es.push_back(a); ed.push_back(b); end
    end
    foreach (es[i]) ew.push_back(wtd ? 1 + int'($urandom % 4) : 1);
    // CSR by counting
    for (int v = 0; v <= NT; v++) adj_off[v] = 0;
    foreach (es[i]) begin adj_off[es[i] + 1]++; adj_off[ed[i] + 1]++; end
    for (int v = 0; v < NT; v++) adj_off[v + 1] += adj_off[v];
    adj_dst.delete(); adj_w.delete();
    for (int i = 0; i < adj_off[NT]; i++) begin adj_dst.push_back(0); adj_w.push_back(0); end
    begin
      int fill [NT];
      for (int v = 0; v < NT; v++) fill[v] = adj_off[v];
      foreach (es[i]) begin
        adj_dst[fill[es[i]]] = ed[i]; adj_w[fill[es[i]]] = ew[i]; fill[es[i]]++;
        adj_dst[fill[ed[i]]] = es[i]; adj_w[fill[ed[i]]] = ew[i]; fill[ed[i]]++;
      end
    end
    // reference: label-correcting shortest paths with a FIFO work list
    begin
      int q [$];
      bit inq [NT];
      for (int v = 0; v < NT; v++) begin ref_dist[v] = INF; inq[v] = 0; end
      ref_dist[0] = 0; q.push_back(0); inq[0] = 1;
      while (q.size() != 0) begin
        int u = q.pop_front();
        inq[u] = 0;
        for (int e = adj_off[u]; e < adj_off[u + 1]; e++) begin
          int v = adj_dst[e];
          if (ref_dist[u] + adj_w[e] < ref_dist[v]) begin
            ref_dist[v] = ref_dist[u] + adj_w[e];
            if (!inq[v]) begin q.push_back(v); inq[v] = 1; end
          end
        end
      end
    end
  endtask

  task automatic init_vertices();
    for (int v = 0; v < NT; v++) begin
      vdist[v] = (v == 0) ? 0 : INF;
      ready[v] = (v == 0);
      changed[v] = 0;
      last_step[v] = 1;     // no step has said "stop" yet
      out_idx[v] = -1;
      st[v] = T_RUN;
      mbox[v].delete();
    end
    for (int k = 0; k < WHEEL; k++) wheel[k].delete();
    for (int c = 0; c < NC; c++) begin rr_recv[c] = 0; rr_send[c] = 0; end
    inflight = 0; waiting = 0; n_blocked = 0; n_done = 0; quiet_start = -1;
  endtask

  // ---- one clock cycle of thread and fabric behaviour (at the falling edge) ----
  task automatic tick();
    bit any_rel;
    bit rel_seen;
    clear_drive(1'b0);
    // barrier returns
    rel_seen = 0;
    for (int c = 0; c < NC; c++) if (retv_c[c] != '0) begin
      for (int t = 0; t < int'(THREADS); t++) begin
        int g = c * THREADS + t;
        if (retv_c[c][t]) begin
          if (st[g] != T_BLOCKED) fail($sformatf("return to thread %0d that is not blocked", g));
          n_blocked--;
          unique case (retval_c[c][t])
            2'd0: begin n_wake++; st[g] = T_RUN; end
            2'd1: begin
              if (!rel_seen) n_step++;
              rel_seen = 1;
              st[g] = T_RUN;
              if (!async_mode && changed[g]) begin ready[g] = 1; last_step[g] = 1; end
              else last_step[g] = 0;
            end
            default: begin
              if (!rel_seen) n_finish++;
              rel_seen = 1;
              st[g] = T_DONE; n_done++;
            end
          endcase
        end
      end
    end
    if (rel_seen) begin
      // safety: a release may only happen with an empty fabric, and all
      // threads were blocked until now
      n_releases++;
      checks++;
      if (inflight != 0 || waiting != 0) fail($sformatf("release with %0d in flight, %0d waiting", inflight, waiting));
      checks++;
      if (n_blocked != 0) fail($sformatf("release left %0d threads blocked", n_blocked));
      checks++;
      if (quiet_start < 0 || cycle - quiet_start > BOUND)
        fail($sformatf("release %0d cycles after quiescence, bound %0d", cycle - quiet_start, BOUND));
      else if (cycle - quiet_start > lat_max) lat_max = cycle - quiet_start;
      quiet_start = -1;
    end
    // deliver due packets
    begin
      int slot = cycle % WHEEL;
      while (wheel[slot].size() != 0) begin
        pkt_t p = wheel[slot].pop_front();
        mbox[p.dst].push_back(p.val);
        inflight--; waiting++;
      end
    end
    // per core: one receive, one send
    for (int c = 0; c < NC; c++) begin
      int f = c / CORES, cl = c % CORES;
      int base = c * THREADS;
      for (int k = 0; k < int'(THREADS); k++) begin
        int g = base + (rr_recv[c] + k) % THREADS;
        if (st[g] == T_RUN && mbox[g].size() != 0) begin
          int m = mbox[g].pop_front();
          waiting--;
          rp_f[f][cl] = 1'b1;
          if (m < vdist[g]) begin
            vdist[g] = m;
            if (async_mode) ready[g] = 1; else changed[g] = 1;
          end
          rr_recv[c] = (g - base + 1) % THREADS;
          break;
        end
      end
      for (int k = 0; k < int'(THREADS); k++) begin
        int g = base + (rr_send[c] + k) % THREADS;
        if (st[g] == T_RUN && (ready[g] || out_idx[g] >= 0)) begin
          if (!send_en[f]) begin n_stall++; break; end
          if (out_idx[g] < 0) begin
            // send handler
            out_val[g] = vdist[g]; changed[g] = 0; ready[g] = 0;
            out_idx[g] = adj_off[g];
          end
          if (out_idx[g] < adj_off[g + 1]) begin
            pkt_t p;
            int d = 1 + int'($urandom % MAXD);
            p.dst = adj_dst[out_idx[g]];
            p.val = out_val[g] + adj_w[out_idx[g]];
            wheel[(cycle + d) % WHEEL].push_back(p);
            inflight++;
            sp_f[f][cl] = 1'b1;
            out_idx[g]++;
          end
          if (out_idx[g] >= adj_off[g + 1]) out_idx[g] = -1;
          rr_send[c] = (g - base + 1) % THREADS;
          break;
        end
      end
    end
    // idle threads enter the barrier
    for (int g = 0; g < NT; g++) begin
      if (st[g] == T_RUN && mbox[g].size() == 0 && !ready[g] && out_idx[g] < 0) begin
        call_c[g / THREADS][tid(g)] = 1'b1;
        vote_c[g / THREADS][tid(g)] = !last_step[g];
        st[g] = T_BLOCKED; n_blocked++;
      end
    end
    for (int g = 0; g < NT; g++) avail_c[g / THREADS][tid(g)] = (mbox[g].size() != 0);
    if (quiet_start < 0 && inflight == 0 && waiting == 0 && n_blocked == NT) quiet_start = cycle + 1;
    any_rel = 0;
  endtask

  // master rounds lasting longer than an idle round: an FPGA held its token
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (status.state != M_TOKEN_WAIT) tok_start <= cycle;
      else if (cycle - tok_start == 2 * int'(LINK_LATENCY) + DEPTH + 6) n_long++;
    end
  end

  task automatic run(bit async_m, bit wtd);
    int t0;
    async_mode = async_m; weighted = wtd;
    build_graph(wtd);
    init_vertices();
    rst_n = 1'b0; enable = 1'b0;
    clear_drive(1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1; enable = 1'b1;
    t0 = cycle;
    while (n_done < NT) begin
      @(negedge clk);
      tick();
    end
    @(negedge clk);
    clear_drive(1'b0);
    tot_black += int'(status.refuted_black);
    tot_count += int'(status.refuted_count);
    tot_rounds += int'(status.rounds);
    begin
      int bad = 0;
      for (int v = 0; v < NT; v++) begin
        checks++;
        if (vdist[v] != ref_dist[v]) begin
          bad++;
          fail($sformatf("vertex %0d dist %0d expected %0d", v, vdist[v], ref_dist[v]));
        end
      end
      $display("run %s %s: %0d vertices, %0d edges, %0d cycles, %0d releases, mismatches %0d",
               async_m ? "async" : "sync", wtd ? "weighted" : "unweighted", NT, adj_off[NT] / 2,
               cycle - t0, n_releases, bad);
    end
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0;
    clear_drive(1'b1);
    if (RUNS[0]) run(1'b0, 1'b0);
    if (RUNS[1]) run(1'b1, 1'b0);
    if (RUNS[2]) run(1'b0, 1'b1);
    if (RUNS[3]) run(1'b1, 1'b1);
    $display("mechanisms: wake=%0d step_release=%0d finish_release=%0d rounds=%0d refuted_black=%0d refuted_count=%0d held_token_rounds=%0d send_stalls=%0d max_release_latency=%0d (bound %0d)",
             n_wake, n_step, n_finish, tot_rounds, tot_black, tot_count, n_long, n_stall, lat_max, BOUND);
    if (REQUIRE_ALL) begin
      checks += 7;
      if (n_wake == 0)   fail("no barrier call woken by a message");
      if (n_step == 0)   fail("no step release");
      if (n_finish == 0) fail("no finish release");
      if (tot_black == 0) fail("no round refuted by a black token");
      if (tot_count == 0) fail("no round refuted by a non-zero count");
      if (n_long == 0)   fail("no token held by an active FPGA");
      if (n_stall == 0)  fail("no send held back by send_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
