// tb_sa_alloc: self-checking test of the switch allocator of a 3x3 quadrant
// crossbar. Random requests each cycle. Checks: a grant only to a
// requesting input; at most one input per output; an output with requests is
// always granted (no idle output while a flit waits for it); out_sel names
// the granted input. With all three inputs asking for one output for three
// cycles, each is served once (round-robin fairness).
module tb_sa_alloc;
  localparam int N = 3, M = 3;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [N-1:0][1:0] req_out;
  logic [M-1:0] out_gnt;
  logic [M-1:0][1:0] out_sel;

  sa_alloc #(.N(N), .M(M), .OW(2), .IW(2)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR t=%0t: %s", $time, msg); end
  endtask

  initial begin
    req = '0; req_out = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      for (int i = 0; i < N; i++) req_out[i] = 2'($urandom_range(M - 1));
      #1;
      for (int o = 0; o < M; o++) begin
        int n_req, n_gnt;
        n_req = 0; n_gnt = 0;
        for (int i = 0; i < N; i++) begin
          if (req[i] && req_out[i] == o) n_req++;
          if (gnt[i] && req_out[i] == o) n_gnt++;
        end
        check(n_gnt <= 1, "two inputs granted one output");
        check((n_req > 0) == (n_gnt == 1), "output idle although requested");
        check(out_gnt[o] == (n_gnt == 1), "out_gnt");
        if (out_gnt[o]) check(gnt[out_sel[o]] && req_out[out_sel[o]] == o, "out_sel");
      end
      check((gnt & ~req) == '0, "grant without request");
    end
    // fairness
    begin
      logic [N-1:0] served;
      served = '0;
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        req = '1; req_out = '0;
        #1 served |= gnt;
      end
      check(served == '1, "round robin must serve every input in N cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
