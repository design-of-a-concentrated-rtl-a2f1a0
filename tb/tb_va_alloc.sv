// tb_va_alloc: self-checking test of the VC allocator (12 router inputs,
// 8 output links + 4 ejection ports). Inputs request random resources and
// hold granted ones for a random time before handing them back. A reference
// model tracks which input owns each resource. Checks: a grant only for a
// free resource and a requesting input; never two grants for one resource;
// every free requested resource is granted to someone; busy matches the
// model; with all inputs asking for one resource, each gets it within 12
// rounds.
module tb_va_alloc;
  localparam int N = 12, M = 12;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, rel;
  logic [N-1:0][3:0] req_res, rel_res;
  logic [M-1:0] busy;

  va_alloc #(.N(N), .M(M), .RW(4)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int owner [M];        // -1 = free
  int held [N];         // resource held by input, -1 = none
  int hold_t [N];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR t=%0t: %s", $time, msg); end
  endtask

  initial begin
    foreach (owner[i]) owner[i] = -1;
    foreach (held[i]) begin held[i] = -1; hold_t[i] = 0; end
    req = '0; rel = '0; req_res = '0; rel_res = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int r = 0; r < M; r++) check(busy[r] == (owner[r] >= 0), "busy vector");
      for (int i = 0; i < N; i++) begin
        rel[i] = 0;
        req[i] = 0;
        if (held[i] >= 0) begin
          if (hold_t[i] == 0) begin rel[i] = 1; rel_res[i] = 4'(held[i]); end
          else hold_t[i]--;
        end else begin
          req[i] = $urandom_range(99) < 50;
          req_res[i] = 4'($urandom_range(M - 1));
        end
      end
      #1;
      for (int r = 0; r < M; r++) begin
        int n;
        bit asked;
        n = 0; asked = 0;
        for (int i = 0; i < N; i++) begin
          if (req[i] && req_res[i] == r) asked = 1;
          if (gnt[i] && req_res[i] == r) n++;
        end
        check(n <= 1, "resource granted twice");
        if (owner[r] >= 0) check(n == 0, "busy resource granted");
        else check((n == 1) == asked, "free requested resource not granted");
      end
      check((gnt & ~req) == '0, "grant without request");
      for (int i = 0; i < N; i++) begin
        if (rel[i]) begin owner[held[i]] = -1; held[i] = -1; end
        if (gnt[i]) begin
          owner[req_res[i]] = i; held[i] = int'(req_res[i]); hold_t[i] = $urandom_range(6);
        end
      end
    end
    // fairness on one resource
    @(negedge clk);
    for (int i = 0; i < N; i++) if (held[i] >= 0) begin rel[i] = 1; rel_res[i] = 4'(held[i]); end
    req = '0;
    @(negedge clk);
    rel = '0;
    begin
      logic [N-1:0] served, g;
      served = '0;
      for (int t = 0; t < 2 * N; t++) begin
        req = ~served; req_res = '0;
        for (int i = 0; i < N; i++) req_res[i] = 4'd5;
        #1;
        g = gnt;
        served |= g;
        @(negedge clk);
        rel = g; rel_res = '{default: 4'd5};
        req = '0;
        @(negedge clk);
        rel = '0;
      end
      check(served == '1, "every input obtains the resource");
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
