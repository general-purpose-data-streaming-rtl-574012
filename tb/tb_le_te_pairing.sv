// tb_le_te_pairing: feeds edge timestamps (TAPS = 16, an 8-bit heartbeat
// counter so coarse wrap-around is crossed, MAX_TOT_CYCLES = 20) for four kinds
// of scenario: a normal pulse, a pulse shorter than one clock (both edges in
// one cycle), a pulse whose trailing edge is lost before the next leading
// edge, and a pulse too long for the timeout. The expected hits (leading time
// and TOT = trailing time - leading time in taps) and drops are worked out per
// cycle from the pulse times and compared with the outputs.
module tb_le_te_pairing;
  import str_tdc_pkg::*;
  localparam int T = 16, CW = 8, MAXC = 20;
  logic clk = 0, rst = 1;
  logic le_valid = 0, te_valid = 0;
  tstamp_t le_time = '0, te_time = '0;
  logic hit_valid, dropped;
  tstamp_t hit_time;
  logic [TOT_W-1:0] hit_tot;
  int checks = 0, failures = 0;

  le_te_pairing #(.TAPS(T), .CNT_W(CW), .MAX_TOT_CYCLES(MAXC)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int le_f [int], te_f [int];           // edges per cycle: fine count
  int hit_le [int], hit_tot_e [int];    // expected hit per output cycle
  bit drop_e [int];

  function automatic int cyc_of(int t); return (t + T - 1) / T; endfunction
  function automatic int fine_of(int t); return t - (cyc_of(t) - 1) * T - 1; endfunction

  task automatic add_edge(bit lead, int t);
    if (lead) le_f[cyc_of(t)] = fine_of(t); else te_f[cyc_of(t)] = fine_of(t);
  endtask

  int t, w, kind, nhit, ndrop, nkinds [4];
  tstamp_t exp_t;
  initial begin
    t = 2 * T;
    nkinds = '{default: 0};
    while (t < 4000 * T) begin
      kind = $urandom % 4;
      nkinds[kind]++;
      case (kind)
        0: begin  // normal pulse
          w = T + $urandom % ((MAXC - 1) * T);
          add_edge(1, t); add_edge(0, t + w);
          hit_le[cyc_of(t + w)] = t; hit_tot_e[cyc_of(t + w)] = w;
          t = t + w;
        end
        1: begin  // short pulse inside one clock period
          t = (t / T) * T + 1 + $urandom % (T / 2);
          w = 1 + $urandom % (T / 2 - 1);
          add_edge(1, t); add_edge(0, t + w);
          hit_le[cyc_of(t)] = t; hit_tot_e[cyc_of(t)] = w;
          t = t + w;
        end
        2: begin  // trailing edge lost, then a normal pulse
          add_edge(1, t);
          t = t + 2 * T + $urandom % (8 * T);
          drop_e[cyc_of(t)] = 1;
          w = T + $urandom % (4 * T);
          add_edge(1, t); add_edge(0, t + w);
          hit_le[cyc_of(t + w)] = t; hit_tot_e[cyc_of(t + w)] = w;
          t = t + w;
        end
        default: begin  // too long: timeout, then orphan trailing edge
          add_edge(1, t);
          drop_e[cyc_of(t) + MAXC + 1] = 1;
          w = (MAXC + 4) * T + $urandom % (4 * T);
          add_edge(0, t + w);
          drop_e[cyc_of(t + w)] = 1;
          t = t + w;
        end
      endcase
      t = t + 2 * T + $urandom % (3 * T);
    end
    nhit = 0; ndrop = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 1; k < cyc_of(t) + 4; k++) begin
      le_valid = le_f.exists(k);
      te_valid = te_f.exists(k);
      le_time  = {HB_W'(k % (1 << CW)), FINE_W'(le_f.exists(k) ? le_f[k] : 0)};
      te_time  = {HB_W'(k % (1 << CW)), FINE_W'(te_f.exists(k) ? te_f[k] : 0)};
      @(negedge clk);
      chk(hit_valid == hit_le.exists(k), $sformatf("hit_valid cyc %0d", k));
      chk(dropped == drop_e.exists(k), $sformatf("dropped cyc %0d", k));
      if (hit_valid && hit_le.exists(k)) begin
        nhit++;
        exp_t = {HB_W'(cyc_of(hit_le[k]) % (1 << CW)), FINE_W'(fine_of(hit_le[k]))};
        chk(hit_time == exp_t, $sformatf("hit time cyc %0d", k));
        chk(int'(hit_tot) == hit_tot_e[k], $sformatf("tot cyc %0d got %0d exp %0d", k, hit_tot, hit_tot_e[k]));
      end
      if (dropped) ndrop++;
    end
    chk(nhit == hit_le.size() && ndrop == drop_e.size(), "all hits and drops seen");
    chk(nkinds[0] > 0 && nkinds[1] > 0 && nkinds[2] > 0 && nkinds[3] > 0, "all scenarios");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
