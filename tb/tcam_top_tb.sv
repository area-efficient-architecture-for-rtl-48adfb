// tcam_top_tb: end-to-end test of the TCAM at its default size.
//
// Loads the four-entry example table (10 10 / 01 01 / 0x 11 / 11 1x), runs
// the worked searches (0011 -> address 2, 1111 -> address 3 and the other
// entries), then runs a random stream of searches and entry writes, issued
// back to back and also while the TCAM is busy rewriting its memories.
// Every result is compared with a direct ternary comparison of the key
// against a copy of the table, and must arrive exactly 3 cycles after the
// search was accepted.  Counts how often each mechanism happened and fails
// if one never did: search stopped at the validation memories, OAT clock
// gated in every layer, priority between several matches in one layer and
// across layers, don't-care match, no match, request ignored while busy,
// entry invalidation, back-to-back searches.
module tcam_top_tb;
  localparam int C = tcam_pkg::C_DEF;
  localparam int W = tcam_pkg::W_DEF;
  localparam int L = tcam_pkg::L_DEF;
  localparam int K = tcam_pkg::K_DEF;
  localparam int E = L * K;
  localparam int AW = tcam_pkg::addr_width(E);
  localparam int LATENCY = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, r_wb = 1'b1, wr_valid = 1'b0;
  logic [C-1:0] c = '0, care = '0;
  logic [AW-1:0] wr_addr = '0;
  logic ready, ma_valid, match;
  logic layer_active [L];
  logic [AW-1:0] ma;

  tcam_top dut (.*);

  always #5 clk = ~clk;

  logic [C-1:0] t_data [E], t_care [E];
  bit t_valid [E];
  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct {
    logic [C-1:0] key;
    int           first;    // expected address, -1 for no match
    longint       due;      // cycle at which ma_valid must show it
  } pending_t;
  pending_t pend [$];

  // mechanism counters
  int n_stopped = 0, n_all_gated = 0, n_multi_layer = 0, n_multi_cross = 0;
  int n_dontcare = 0, n_nomatch = 0, n_ignored = 0, n_invalidate = 0;
  int n_b2b = 0, n_searches = 0, n_writes = 0;
  bit last_was_search = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [cycle %0d] %s", cycle, what);
    end
  endtask

  function automatic bit entry_match(int e, logic [C-1:0] key);
    return t_valid[e] && (((t_data[e] ^ key) & t_care[e]) == '0);
  endfunction

  function automatic bit sub_known(int l, int n, logic [C-1:0] key);
    for (int k = 0; k < K; k++) begin
      int e;
      e = l * K + k;
      if (t_valid[e] && ((((t_data[e] ^ key) & t_care[e]) >> (C - (n + 1) * W)) % (1 << W)) == 0)
        return 1;
    end
    return 0;
  endfunction

  // Result monitor: compares every ma_valid with the oldest pending search.
  always @(negedge clk) begin
    if (rst_n && ma_valid) begin
      if (pend.size() == 0) begin
        check(0, "result without a search");
      end else begin
        pending_t p;
        p = pend.pop_front();
        check(cycle == p.due, $sformatf("key %b: result at cycle %0d, due %0d", p.key, cycle, p.due));
        check(match == (p.first >= 0) && (p.first < 0 || ma == AW'(p.first)),
              $sformatf("key %b: match %0b ma %0d, expected %0d", p.key, match, ma, p.first));
      end
    end
  end

  // Drive one request in the coming cycle (called just after a falling edge).
  task automatic issue(input bit is_search, input logic [C-1:0] key, input logic [C-1:0] m,
                       input int addr, input bit v);
    req = 1'b1; r_wb = is_search; c = key; care = m; wr_addr = AW'(addr); wr_valid = v;
    if (!ready) begin
      n_ignored++;
      last_was_search = 0;
    end else if (is_search) begin
      pending_t p;
      int hits, layers_hit;
      p.key = key; p.first = -1; p.due = cycle + LATENCY;
      hits = 0; layers_hit = 0;
      for (int l = 0; l < L; l++) begin
        bit lh, act;
        lh = 0; act = 1;
        for (int k = 0; k < K; k++) begin
          int e;
          e = l * K + k;
          if (entry_match(e, key)) begin
            hits++; lh = 1;
            if (p.first < 0) begin
              p.first = e;
              if (t_care[e] != '1) n_dontcare++;
            end
          end
        end
        layers_hit += int'(lh);
        for (int n = 0; n < C / W; n++) act &= sub_known(l, n, key);
        if (!act) n_stopped++;
        act_exp[l] = act;
      end
      if (hits == 0) n_nomatch++;
      if (layers_hit > 1) n_multi_cross++;
      else if (hits > 1) n_multi_layer++;
      pend.push_back(p);
      n_searches++;
      if (last_was_search) n_b2b++;
      last_was_search = 1;
    end else begin
      t_data[addr] = key; t_care[addr] = m; t_valid[addr] = v;
      if (!v) n_invalidate++;
      n_writes++;
      last_was_search = 0;
    end
  endtask

  task automatic idle();
    req = 1'b0;
    last_was_search = 0;
  endtask

  task automatic wait_ready();
    idle();
    while (!ready) @(negedge clk);
  endtask

  // Layer activation, worked out when the search is issued, is checked one
  // cycle after the search was accepted.
  bit act_exp [L];
  bit act_exp_q [L];
  bit act_check = 0;
  always @(negedge clk) begin
    if (act_check) begin
      bit any;
      any = 0;
      for (int l = 0; l < L; l++) begin
        any |= act_exp_q[l];
        check(layer_active[l] == act_exp_q[l], $sformatf("layer %0d activation", l));
      end
      if (!any) n_all_gated++;
    end
  end
  always @(posedge clk) begin
    act_check <= req && r_wb && ready;
    act_exp_q <= act_exp;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    for (int e = 0; e < E; e++) t_valid[e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    busy_cycles = 0;
    while (!ready) begin
      busy_cycles++;
      @(negedge clk);
    end
    check(busy_cycles == 2**W, $sformatf("busy after reset for %0d cycles", busy_cycles));

    if (C == 4 && E == 4) begin
      logic [C-1:0] d [4] = '{4'b1010, 4'b0101, 4'b0011, 4'b1110};
      logic [C-1:0] m [4] = '{4'b1111, 4'b1111, 4'b1011, 4'b1110};
      for (int e = 0; e < 4; e++) begin
        issue(0, d[e], m[e], e, 1);
        @(negedge clk);
        wait_ready();
      end
      // worked searches, back to back
      issue(1, 4'b0011, '0, 0, 0); @(negedge clk);
      issue(1, 4'b1111, '0, 0, 0); @(negedge clk);
      issue(1, 4'b1010, '0, 0, 0); @(negedge clk);
      issue(1, 4'b0101, '0, 0, 0); @(negedge clk);
      issue(1, 4'b0111, '0, 0, 0); @(negedge clk);
      issue(1, 4'b1001, '0, 0, 0); @(negedge clk);
      idle();
      repeat (LATENCY + 1) @(negedge clk);
    end

    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 75) begin
        logic [C-1:0] key;
        int e;
        e = $urandom_range(0, E - 1);
        if ($urandom_range(0, 2) != 0) key = (t_data[e] & t_care[e]) | (C'($urandom) & ~t_care[e]);
        else key = C'($urandom);
        issue(1, key, '0, 0, 0);
      end else if (r < 82) begin
        issue(0, C'($urandom), C'($urandom) | C'($urandom), $urandom_range(0, E - 1),
              $urandom_range(0, 5) != 0);
      end else begin
        idle();
      end
      @(negedge clk);
    end
    idle();
    repeat (LATENCY + 2**W + 2) @(negedge clk);
    check(pend.size() == 0, $sformatf("%0d searches without result", pend.size()));

    $display("searches %0d, writes %0d", n_searches, n_writes);
    $display("stopped at VM %0d, all OATs gated %0d, multi-match in a layer %0d, across layers %0d",
             n_stopped, n_all_gated, n_multi_layer, n_multi_cross);
    $display("don't-care match %0d, no match %0d, ignored while busy %0d, invalidations %0d, back-to-back %0d",
             n_dontcare, n_nomatch, n_ignored, n_invalidate, n_b2b);
    check(n_stopped > 0, "search stopped at VM never happened");
    check(n_all_gated > 0, "all OATs gated never happened");
    check(n_multi_layer > 0, "priority inside a layer never happened");
    check(n_multi_cross > 0, "priority across layers never happened");
    check(n_dontcare > 0, "don't-care match never happened");
    check(n_nomatch > 0, "no match never happened");
    check(n_ignored > 0, "request while busy never happened");
    check(n_invalidate > 0, "invalidation never happened");
    check(n_b2b > 0, "back-to-back searches never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
