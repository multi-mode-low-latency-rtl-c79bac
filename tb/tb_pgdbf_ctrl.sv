// tb_pgdbf_ctrl: drives the controller with random load / start requests and
// scripted syndrome sequences and compares every output, every clock, with a
// cycle-level model of the two-state control (done, give_up, iteration
// count, update and load enables, GDBF window). Also checks the latency:
// done comes k+1 clocks after start for a word converging after k flips.
module tb_pgdbf_ctrl;
  localparam int unsigned GDBF_ITERS = 4;
  logic       clk = 0, rst, load_data_in, start, syndrome_zero;
  logic [7:0] max_iteration;
  logic       load, update, gdbf_mode, done, give_up;
  logic [7:0] iteration;
  // model
  logic       m_run, m_done, m_gu;
  logic [7:0] m_it, m_max;
  int checks = 0, failures = 0, n_done = 0, n_gu = 0, n_gdbf = 0, n_pgdbf = 0;

  pgdbf_ctrl #(.GDBF_ITERS(GDBF_ITERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic e_load, e_update, e_gdbf;
    e_load   = !m_run && load_data_in;
    e_update = m_run && !syndrome_zero && (m_it != m_max);
    e_gdbf   = int'(m_it) < int'(GDBF_ITERS);
    checks++;
    if (load !== e_load || update !== e_update || gdbf_mode !== e_gdbf ||
        done !== m_done || give_up !== m_gu || iteration !== m_it) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0t load=%b/%b upd=%b/%b gdbf=%b/%b done=%b/%b gu=%b/%b it=%0d/%0d",
                 $time, load, e_load, update, e_update, gdbf_mode, e_gdbf,
                 done, m_done, give_up, m_gu, iteration, m_it);
    end
  endtask

  task automatic step();
    #1;  // let the combinational outputs follow the new inputs
    compare();
    @(posedge clk);
    if (!m_run) begin
      if (load_data_in) begin
        m_done = 0; m_gu = 0;
      end else if (start) begin
        m_run = 1; m_max = max_iteration; m_it = 0; m_done = 0; m_gu = 0;
      end
    end else begin
      if (syndrome_zero) begin
        m_done = 1; m_run = 0; n_done++;
      end else if (m_it == m_max) begin
        m_gu = 1; m_run = 0; n_gu++;
      end else begin
        if (int'(m_it) < int'(GDBF_ITERS)) n_gdbf++; else n_pgdbf++;
        m_it = m_it + 1;
      end
    end
    #1;
  endtask

  initial begin
    rst = 1; load_data_in = 0; start = 0; syndrome_zero = 0; max_iteration = 0;
    @(posedge clk); #1;
    rst = 0;
    m_run = 0; m_done = 0; m_gu = 0; m_it = 0; m_max = 0;
    // Directed latency runs: converge after k iterations
    for (int k = 0; k < 12; k++) begin
      int lat;
      load_data_in = 1; step(); load_data_in = 0;
      max_iteration = 20; start = 1; syndrome_zero = 0; step(); start = 0;
      lat = 0;
      while (!done && lat < 50) begin
        syndrome_zero = (lat == k);
        step();
        lat++;
      end
      checks++;
      if (!done || lat != k + 1 || int'(iteration) != k) begin
        failures++;
        $display("FAIL latency k=%0d lat=%0d iteration=%0d done=%b", k, lat, iteration, done);
      end
    end
    // Random traffic
    for (int t = 0; t < 20000; t++) begin
      load_data_in  = ($urandom_range(7, 0) == 0);
      start         = ($urandom_range(3, 0) == 0);
      syndrome_zero = ($urandom_range(9, 0) == 0);
      if ($urandom_range(4, 0) == 0) max_iteration = 8'($urandom_range(12, 0));
      step();
    end
    checks++;
    if (n_done == 0 || n_gu == 0 || n_gdbf == 0 || n_pgdbf == 0) begin
      failures++;
      $display("FAIL not every case seen: done=%0d give_up=%0d gdbf=%0d pgdbf=%0d",
               n_done, n_gu, n_gdbf, n_pgdbf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
