// tb_dc_demux: self-checking test of the output DEMUX of one direction.
// Random flits from the two crossbars of the direction, with distinct VCs
// when both are valid (as VC allocation guarantees): each must appear on the
// link of its VC, an unused link must be idle, and each announcement must
// raise vc_en of the announced link only.
module tb_dc_demux;
  import ctorus_pkg::*;

  logic [1:0] ann_valid, ann_vc, in_valid, in_vc, vc_en, link_valid;
  flit_t [1:0] in_flit, link_flit;

  dc_demux dut (.*);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    ann_valid = '0; ann_vc = '0; in_valid = '0; in_vc = '0; in_flit = '0;
    for (int t = 0; t < 2000; t++) begin
      logic [1:0] exp_v, exp_en;
      flit_t [1:0] exp_f;
      @(negedge clk);
      in_valid = 2'($urandom);
      in_vc[0] = 1'($urandom);
      in_vc[1] = (in_valid == 2'b11) ? !in_vc[0] : 1'($urandom);
      ann_valid = 2'($urandom);
      ann_vc[0] = 1'($urandom);
      ann_vc[1] = (ann_valid == 2'b11) ? !ann_vc[0] : 1'($urandom);
      for (int s = 0; s < 2; s++) in_flit[s] = {2'($urandom), {4{$urandom}}};
      #1;
      exp_v = '0; exp_en = '0; exp_f = '0;
      for (int s = 0; s < 2; s++) begin
        if (in_valid[s]) begin exp_v[in_vc[s]] = 1; exp_f[in_vc[s]] = in_flit[s]; end
        if (ann_valid[s]) exp_en[ann_vc[s]] = 1;
      end
      check(link_valid == exp_v, "link valid");
      check(vc_en == exp_en, "vc_en");
      for (int v = 0; v < 2; v++) if (exp_v[v]) check(link_flit[v] == exp_f[v], "flit on link");
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
