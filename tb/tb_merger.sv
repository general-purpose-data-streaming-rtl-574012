// tb_merger: four input FIFOs (modelled as queues in the testbench) get random
// frames of data words, each closed by a delimiter. The output is read with
// random back-pressure, so the output FIFO fills and the merger stalls. Checks:
//   * per frame, the output holds exactly the data words of that frame from
//     every input, each input's words in their order, then one delimiter with
//     the frame number and the OR of the input flags;
//   * among inputs with data and no delimiter at the head, the lowest-numbered
//     one is read first (checked cycle by cycle on in_rd_en);
//   * a frame-number disagreement sets the mismatch flag;
//   * with no back-pressure, one word per clock comes out.
module tb_merger;
  import str_tdc_pkg::*;
  localparam int N = 4, OD = 8;
  logic clk = 0, rst = 1;
  logic [N-1:0] in_empty, in_rd_en;
  word_t in_data [N];
  logic out_rd_en = 0, out_empty, stall, delim_merged, frame_mismatch;
  word_t out_data;
  int checks = 0, failures = 0;

  merger #(.N_IN(N), .OUT_DEPTH(OD)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t q [N][$];          // input FIFO contents
  word_t exp_out [$];       // expected output, frame by frame
  always_comb for (int i = 0; i < N; i++) begin
    in_empty[i] = (q[i].size() == 0);
    in_data[i]  = (q[i].size() != 0) ? q[i][0] : '0;
  end

  // priority check and FIFO pops
  int stalls, mism, ntimes_lower_waiting;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      if (in_rd_en[i]) begin
        if (!is_delim(in_data[i]))
          for (int j = 0; j < i; j++)
            if (!in_empty[j] && !is_delim(in_data[j])) begin
              failures++; $display("FAIL: input %0d read before lower input %0d", i, j);
            end
        void'(q[i].pop_front());
      end
    end
    if (stall) stalls++;
    if (frame_mismatch) mism++;
  end

  function automatic word_t dword(int i, int f, int n);
    return {4'h1, 4'(i), 24'(f), 32'(n)};
  endfunction

  int nout, rate_words, rate_cycles;
  word_t got;
  logic [3:0] fl;
  initial begin
    stalls = 0; mism = 0;
    // 12 frames; frame 9 has a wrong frame number on input 2
    for (int f = 0; f < 12; f++) begin
      fl = '0;
      for (int i = 0; i < N; i++) begin
        automatic int n = $urandom % 6;
        logic [3:0] fi;
        for (int k = 0; k < n; k++) begin
          q[i].push_back(dword(i, f, k));
        end
        fi = 4'($urandom % 2);             // overflow flag
        fl |= fi;
        q[i].push_back(make_delim((f == 9 && i == 2) ? 24'(f + 100) : 24'(f), fi));
      end
      // expected: words of frame f, sorted per input later, then delimiter
      if (f == 9) fl[FLAG_MISMATCH] = 1'b1;
      exp_out.push_back(make_delim(24'(f), fl));
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // read with back-pressure; check frame order and content
    begin
      int frame_now, next_k [N];
      frame_now = 0;
      for (int i = 0; i < N; i++) next_k[i] = 0;
      nout = 0;
      while (exp_out.size() > 0) begin
        out_rd_en = !out_empty && ($urandom % 4 == 0);
        got = out_data;
        @(negedge clk);
        if (out_rd_en) begin
          nout++;
          if (is_delim(got)) begin
            chk(got == exp_out[0], $sformatf("delimiter of frame %0d: %h exp %h", frame_now, got, exp_out[0]));
            void'(exp_out.pop_front());
            frame_now++;
            for (int i = 0; i < N; i++) next_k[i] = 0;
          end else begin
            automatic int i = int'(got[59:56]);
            chk(int'(got[55:32]) == frame_now, "data word in its frame");
            chk(int'(got[31:0]) == next_k[i], "input order kept");
            next_k[i]++;
          end
        end
      end
    end
    out_rd_en = 0;
    chk(stalls > 0, "back-pressure stalled the merger");
    chk(mism == 1, $sformatf("one frame mismatch seen (%0d)", mism));
    // rate: 40 words on input 0 and 1, read every cycle
    for (int k = 0; k < 20; k++) begin q[0].push_back(dword(0, 50, k)); q[1].push_back(dword(1, 50, k)); end
    @(negedge clk);
    rate_words = 0; rate_cycles = 0;
    out_rd_en = 1;
    repeat (2) @(negedge clk);  // pipeline fill
    while (rate_words < 38) begin
      rate_cycles++;
      if (!out_empty) rate_words++;
      @(negedge clk);
    end
    chk(rate_cycles == 38, $sformatf("one word per clock: %0d words in %0d cycles", rate_words, rate_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
