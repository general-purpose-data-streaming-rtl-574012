// tb_tdc_edge_encoder: random pulses on one channel, sampled at TAPS points per
// clock period (tap i of the word captured at clock k sees the input at time
// k*TAPS - i, in tap units). For each pulse the testbench works out in which
// word each edge lands and its fine count (edge time - (k-1)*TAPS - 1) and
// checks the registered edge outputs. Pulses are long and short (both edges in
// one word), and edges right at a word boundary are included.
module tb_tdc_edge_encoder;
  import str_tdc_pkg::*;
  localparam int T = 16;
  localparam int NCYC = 3000;
  logic clk = 0, rst = 1;
  logic [T-1:0] taps = '0;
  logic [HB_W-1:0] coarse = '0;
  logic le_valid, te_valid;
  tstamp_t le_time, te_time;
  int checks = 0, failures = 0;

  tdc_edge_encoder #(.TAPS(T)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // signal is high on [rise[p], fall[p])
  int rise [$], fall [$];
  bit sig_at [int];
  int exp_le_fine [int], exp_te_fine [int];   // keyed by capture cycle

  function automatic int cyc_of(int t);  // capture cycle of an edge at time t
    return (t + T - 1) / T;
  endfunction

  int t, w, nle, nte;
  initial begin
    // build pulses
    t = 3 * T;
    while (t < (NCYC - 10) * T) begin
      w = ($urandom % 4 == 0) ? 1 + $urandom % (T - 1) : T + $urandom % (4 * T);
      if ($urandom % 8 == 0) t = (t / T) * T;       // edge exactly at a sample point
      rise.push_back(t); fall.push_back(t + w);
      exp_le_fine[cyc_of(t)] = t - (cyc_of(t) - 1) * T - 1;
      exp_te_fine[cyc_of(t + w)] = (t + w) - (cyc_of(t + w) - 1) * T - 1;
      t = t + w + T + 1 + $urandom % (3 * T);
    end
    for (int p = 0; p < rise.size(); p++)
      for (int s = rise[p]; s < fall[p]; s++) sig_at[s] = 1;
    nle = 0; nte = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 1; k < NCYC; k++) begin
      // drive word k
      for (int i = 0; i < T; i++) taps[i] = sig_at.exists(k * T - i);
      coarse = HB_W'(k);
      @(negedge clk);
      // outputs now show word k
      chk(le_valid == exp_le_fine.exists(k), $sformatf("le_valid cyc %0d", k));
      chk(te_valid == exp_te_fine.exists(k), $sformatf("te_valid cyc %0d", k));
      if (le_valid && exp_le_fine.exists(k)) begin
        nle++;
        chk(le_time.coarse == HB_W'(k) && int'(le_time.fine) == exp_le_fine[k],
            $sformatf("le time cyc %0d fine %0d exp %0d", k, le_time.fine, exp_le_fine[k]));
      end
      if (te_valid && exp_te_fine.exists(k)) begin
        nte++;
        chk(te_time.coarse == HB_W'(k) && int'(te_time.fine) == exp_te_fine[k],
            $sformatf("te time cyc %0d fine %0d exp %0d", k, te_time.fine, exp_te_fine[k]));
      end
    end
    chk(nle == rise.size() && nte == fall.size(), $sformatf("edges %0d/%0d of %0d", nle, nte, rise.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
