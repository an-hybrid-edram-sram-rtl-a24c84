// Self-checking test of way_lookup against a reference written independently
// in the testbench: random sets (pointer permutations, valid/dirty bits, LRU
// ages, sentry bits) and request tags that often match, checking the hit
// class, the hit entry and way, the expired-sentry flag, the MRU entry and the
// victim choice.
module tb_way_lookup;
  localparam int WAYS = 4, TW = 4, WW = 2;
  int checks = 0, failures = 0;

  logic [TW-1:0]           req_tag;
  logic [WAYS-1:0]         valid, dirty;
  logic [WAYS-1:0][TW-1:0] tag;
  logic [WAYS-1:0][WW-1:0] ptr, age;
  logic [WAYS-1:1]         sentry_alive;
  logic                    static_hit, dynamic_hit, sentry_expired, victim_dirty;
  logic [WW-1:0]           hit_entry, hit_way, mru_entry, victim_entry, victim_way;

  way_lookup #(.WAYS(WAYS), .TAG_W(TW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_static = 0, n_dyn = 0, n_exp = 0;
    for (int n = 0; n < 5000; n++) begin
      int p[4], a[4];
      bit pres[4];
      int exp_hit, exp_mru, exp_victim, best_age;
      p = '{0, 1, 2, 3}; p.shuffle();
      a = '{0, 1, 2, 3}; a.shuffle();
      valid = 4'($urandom); dirty = 4'($urandom) & valid;
      sentry_alive = 3'($urandom);
      req_tag = TW'($urandom_range(3));
      for (int e = 0; e < WAYS; e++) begin
        ptr[e] = WW'(p[e]);
        age[e] = WW'(a[e]);
        // distinct tags within a set, drawn from a small range
        tag[e] = TW'((e + n) % 4);
      end
      #1;
      // reference
      exp_hit = -1; exp_mru = -1;
      for (int e = 0; e < WAYS; e++) begin
        pres[e] = valid[e] && (p[e] == 0 || dirty[e] || sentry_alive[p[e] == 0 ? 1 : p[e]]);
        if (p[e] == 0) exp_mru = e;
        if (tag[e] == req_tag && pres[e]) exp_hit = e;
      end
      exp_victim = -1;
      for (int e = 0; e < WAYS; e++)
        if (p[e] != 0 && tag[e] == req_tag && valid[e] && !pres[e]) exp_victim = e;
      if (exp_victim < 0)
        for (int e = 0; e < WAYS; e++)
          if (p[e] != 0 && !pres[e] && exp_victim < 0) exp_victim = e;
      if (exp_victim < 0) begin
        best_age = -1;
        for (int e = 0; e < WAYS; e++)
          if (p[e] != 0 && a[e] > best_age) begin best_age = a[e]; exp_victim = e; end
      end
      checks++;
      if (static_hit !== (exp_hit >= 0 && p[exp_hit] == 0) ||
          dynamic_hit !== (exp_hit >= 0 && p[exp_hit] != 0) ||
          (exp_hit >= 0 && (hit_entry !== WW'(exp_hit) || hit_way !== WW'(p[exp_hit]))) ||
          mru_entry !== WW'(exp_mru)) begin
        failures++;
        $display("FAIL hit n=%0d: s=%b d=%b entry=%0d exp=%0d", n, static_hit, dynamic_hit, hit_entry, exp_hit);
      end
      checks++;
      if (victim_entry !== WW'(exp_victim) || victim_way !== WW'(p[exp_victim]) ||
          victim_dirty !== (valid[exp_victim] && dirty[exp_victim])) begin
        failures++;
        $display("FAIL victim n=%0d: got %0d expected %0d", n, victim_entry, exp_victim);
      end
      checks++;
      begin
        bit e_exp;
        e_exp = 0;
        for (int e = 0; e < WAYS; e++) if (tag[e] == req_tag && valid[e] && !pres[e]) e_exp = 1;
        if (sentry_expired !== e_exp) begin failures++; $display("FAIL sentry_expired n=%0d", n); end
        if (e_exp) n_exp++;
      end
      if (static_hit) n_static++;
      if (dynamic_hit) n_dyn++;
    end
    checks++;
    if (n_static == 0 || n_dyn == 0 || n_exp == 0) begin
      failures++; $display("FAIL coverage: static %0d dynamic %0d expired %0d", n_static, n_dyn, n_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
