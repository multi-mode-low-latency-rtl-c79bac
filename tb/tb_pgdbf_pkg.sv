// tb_pgdbf_pkg: checks the parity-check matrix described by the package's
// constant functions, at full size, for both rate-1/2 codes of length 1296:
// dv = 3, dc = 6 (Z = 216, the default) and dv = 4, dc = 8 (Z = 162).
//   * every edge of a variable node lands in the block-row it names, and the
//     check node's matching edge leads back to the same variable node;
//   * every check node has exactly dc edges, every variable node dv;
//   * no two variable nodes share two check nodes (no 4-cycles).
module tb_pgdbf_pkg;
  import pgdbf_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(input int unsigned z, input int unsigned dv, input int unsigned dc);
    int unsigned n_vn, n_cn;
    int deg [];
    int cyc;
    n_vn = dc * z;
    n_cn = dv * z;
    deg = new[n_cn];
    foreach (deg[i]) deg[i] = 0;
    // edge consistency and check-node degree
    for (int unsigned n = 0; n < n_vn; n++)
      for (int unsigned d = 0; d < dv; d++) begin
        int unsigned m;
        m = cn_of_vn(n, d, z);
        checks++;
        if (m / z != d || m >= n_cn || vn_of_cn(m, n / z, z) != n) begin
          failures++;
          if (failures < 10) $display("FAIL z=%0d vn %0d edge %0d -> cn %0d -> vn %0d",
                                      z, n, d, m, vn_of_cn(m, n / z, z));
        end
        if (m < n_cn) deg[m]++;
      end
    foreach (deg[m]) begin
      checks++;
      if (deg[m] != int'(dc)) begin
        failures++;
        if (failures < 10) $display("FAIL z=%0d cn %0d degree %0d", z, m, deg[m]);
      end
    end
    // 4-cycles: two check nodes of one variable node share another variable node
    cyc = 0;
    for (int unsigned n = 0; n < n_vn; n++)
      for (int unsigned d1 = 0; d1 < dv; d1++)
        for (int unsigned d2 = d1 + 1; d2 < dv; d2++)
          for (int unsigned e1 = 0; e1 < dc; e1++)
            for (int unsigned e2 = 0; e2 < dc; e2++) begin
              int unsigned a, b;
              a = vn_of_cn(cn_of_vn(n, d1, z), e1, z);
              b = vn_of_cn(cn_of_vn(n, d2, z), e2, z);
              if (a == b && a != n) cyc++;
            end
    checks++;
    if (cyc != 0) begin
      failures++;
      $display("FAIL z=%0d dv=%0d dc=%0d: %0d 4-cycle instances", z, dv, dc, cyc);
    end
  endtask

  initial begin
    checks++;
    if (DEF_DC * DEF_Z != 1296 || DEF_DV * DEF_Z != 648 || energy_width(DEF_DV) != 3) begin
      failures++;
      $display("FAIL default geometry");
    end
    check_code(DEF_Z, DEF_DV, DEF_DC);
    check_code(162, 4, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
