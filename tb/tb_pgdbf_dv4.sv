// tb_pgdbf_dv4: the dv = 4, dc = 8 (rate 0.5) configuration of the decoder,
// the code family of the error-rate study, on a 184-bit code (Z = 23).
// It repeats the dv = 3 end-to-end test (tb_pgdbf_decoder) with these code
// parameters, up to 14 bit errors per word and a GDBF window of 3 iterations.
//
// A cycle-level reference model of the whole decoder (Tanner graph, energy,
// maximum, random mask from its own LFSR model, control) runs in lockstep and
// every clock data_out, done, give_up and iteration are compared with it.
// Independently of the model, every word reported as done is unloaded through
// data_out and must satisfy all parity checks, the done latency must be
// iteration + 1 clocks, and decoded words equal to the sent codeword are
// counted. Codewords are built from whole circulant blocks of ones (an even
// number of blocks satisfies every check); bit errors are added at random.
// Each mechanism (load with overlapped unload, convergence with and without
// flips, give_up, GDBF and PGDBF iterations, a flip suppressed by the random
// mask, several flips in one iteration) must occur at least once.
module tb_pgdbf_dv4;
  localparam int unsigned Z = 23, DV = 4, DC = 8, P0_NUM = 230, GDBF_ITERS = 3;
  localparam logic [31:0] SEED = 32'h0BAD_F00D;
  localparam int unsigned N = DC * Z, M = DV * Z;
  localparam int unsigned TRIALS = 150;

  logic       clk = 0, rst, data_in, load_data_in, start;
  logic [7:0] max_iteration;
  logic       data_out, done, give_up;
  logic [7:0] iteration;

  pgdbf_decoder #(.Z(Z), .DV(DV), .DC(DC), .P0_NUM(P0_NUM), .GDBF_ITERS(GDBF_ITERS),
                  .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_done = 0, n_done0 = 0, n_gu = 0, n_gdbf = 0, n_pgdbf = 0;
  int n_masked = 0, n_multi = 0, n_corrected = 0;

  // ---------------- reference model ----------------
  logic [N-1:0] my, mv, mrb;
  logic [31:0]  ml;
  logic         m_run, m_done, m_gu;
  logic [7:0]   m_it, m_max;

  function automatic int vn(int m, int e);  // column of the e-th one in row m
    int i = m / int'(Z), r = m % int'(Z);
    return e * int'(Z) + (r + i * e) % int'(Z);
  endfunction

  function automatic logic [M-1:0] syndrome(logic [N-1:0] w);
    logic [M-1:0] s;
    for (int m = 0; m < int'(M); m++) begin
      s[m] = 1'b0;
      for (int e = 0; e < int'(DC); e++) s[m] ^= w[vn(m, e)];
    end
    return s;
  endfunction

  task automatic model_edge();
    logic [M-1:0] s;
    int en [N];
    int emax, nflip;
    logic b;
    s = syndrome(mv);
    if (!m_run) begin
      if (load_data_in) begin
        my = {data_in, my[N-1:1]};
        mv = {data_in, mv[N-1:1]};
        m_done = 0; m_gu = 0;
      end else if (start) begin
        m_run = 1; m_max = max_iteration; m_it = 0; m_done = 0; m_gu = 0;
      end
    end else if (s == '0) begin
      m_done = 1; m_run = 0;
    end else if (m_it == m_max) begin
      m_gu = 1; m_run = 0;
    end else begin
      emax = 0;
      for (int n = 0; n < int'(N); n++) en[n] = int'(mv[n] ^ my[n]);
      for (int m = 0; m < int'(M); m++)
        if (s[m]) for (int e = 0; e < int'(DC); e++) en[vn(m, e)]++;
      for (int n = 0; n < int'(N); n++) if (en[n] > emax) emax = en[n];
      nflip = 0;
      for (int n = 0; n < int'(N); n++)
        if (en[n] == emax) begin
          if (mrb[n] || int'(m_it) < int'(GDBF_ITERS)) begin
            mv[n] = ~mv[n]; nflip++;
          end else n_masked++;
        end
      if (nflip > 1) n_multi++;
      if (int'(m_it) < int'(GDBF_ITERS)) n_gdbf++; else n_pgdbf++;
      m_it = m_it + 1;
    end
    b   = (int'(ml & 32'hFF) < int'(P0_NUM));
    ml  = {ml[30:0], ml[31] ^ ml[21] ^ ml[1] ^ ml[0]};
    mrb = {mrb[N-2:0], b};
  endtask

  task automatic step();
    checks++;
    if (data_out !== mv[0] || done !== m_done || give_up !== m_gu || iteration !== m_it) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0t data_out=%b/%b done=%b/%b give_up=%b/%b iteration=%0d/%0d",
                 $time, data_out, mv[0], done, m_done, give_up, m_gu, iteration, m_it);
    end
    @(posedge clk);
    model_edge();
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] sent, prev_sent, unloaded;
    logic         prev_done;
    rst = 1; data_in = 0; load_data_in = 0; start = 0; max_iteration = 20;
    @(posedge clk); #1;
    rst = 0;
    my = '0; mv = '0; mrb = '0; ml = SEED; m_run = 0; m_done = 0; m_gu = 0; m_it = 0; m_max = 0;
    prev_done = 0; prev_sent = '0;
    for (int t = 0; t <= int'(TRIALS); t++) begin
      logic [DC-1:0] mask;
      int w, lat;
      // codeword from an even number of all-ones blocks
      mask = DC'($urandom);
      if (^mask) mask[0] = ~mask[0];
      for (int n = 0; n < int'(N); n++) sent[n] = mask[n / int'(Z)];
      checks++;
      if (syndrome(sent) != '0) begin
        failures++;
        $display("FAIL testbench codeword not valid");
      end
      w = (t % 10 == 0) ? 0 : $urandom_range(14, 1);
      for (int k = 0; k < w; k++) sent[$urandom_range(int'(N) - 1, 0)] ^= 1'b1;
      // load this word while the previous result leaves on data_out
      load_data_in = 1;
      for (int n = 0; n < int'(N); n++) begin
        data_in = sent[n];
        unloaded[n] = data_out;
        step();
      end
      load_data_in = 0;
      n_load++;
      if (prev_done) begin
        checks++;
        if (syndrome(unloaded) != '0) begin
          failures++;
          $display("FAIL trial %0d: word reported done is not a codeword", t - 1);
        end
        if (unloaded == prev_sent) n_corrected++;
      end
      if (t == int'(TRIALS)) break;
      // clean copy of the codeword, for the correction count
      for (int n = 0; n < int'(N); n++) prev_sent[n] = mask[n / int'(Z)];
      // decode
      max_iteration = (t % 7 == 3) ? 8'd1 : 8'd20;
      start = 1; step(); start = 0;
      lat = 0;
      while (!done && !give_up && lat < 300) begin
        step();
        lat++;
      end
      checks++;
      if (lat != int'(iteration) + 1) begin
        failures++;
        $display("FAIL trial %0d: latency %0d for %0d iterations", t, lat, iteration);
      end
      prev_done = done;
      if (done) begin
        n_done++;
        if (iteration == 0) n_done0++;
      end
      if (give_up) begin
        n_gu++;
        checks++;
        if (iteration != max_iteration) begin
          failures++;
          $display("FAIL trial %0d: give_up after %0d iterations", t, iteration);
        end
      end
      repeat ($urandom_range(2, 0)) step();
    end
    $display("loads=%0d done=%0d done_without_flip=%0d give_up=%0d gdbf_iters=%0d pgdbf_iters=%0d masked_flips=%0d multi_flip_iters=%0d corrected=%0d",
             n_load, n_done, n_done0, n_gu, n_gdbf, n_pgdbf, n_masked, n_multi, n_corrected);
    checks++;
    if (n_load == 0 || n_done == 0 || n_done0 == 0 || n_gu == 0 || n_gdbf == 0 ||
        n_pgdbf == 0 || n_masked == 0 || n_multi == 0 || n_corrected == 0) begin
      failures++;
      $display("FAIL some mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
