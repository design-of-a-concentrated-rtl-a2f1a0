// tb_tsr_link: self-checking test of a three-state repeater link with its
// control block.
//
// An upstream model sends numbered flits: it announces a flit (vc_en) while
// full is low and puts it on the link two cycles later. A downstream input
// register takes the link output and is emptied with a given probability.
// Checks: every flit arrives once, in order, with its contents intact; on an
// uncongested link a flit put on the link reaches the register in the same
// cycle (link traversal in one cycle); with the register always emptied the
// link carries one flit per cycle; under congestion flits are held in the
// repeater stages and no flit is lost.
module tb_tsr_link;
  import ctorus_pkg::*;
  localparam int S = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, vc_en, full, out_valid, out_ready, reg_full;
  logic [1:0] room;   // checked in the control-block test
  flit_t in_flit, out_flit;
  logic [S-1:0] rel_stage, hold;

  tsr_link #(.STAGES(S)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int next_tx = 0, next_rx = 0;
  bit ann [2];
  bit m_reg = 0;
  flit_t reg_q;
  int pop_pct = 100;
  int send_pct = 100;
  int max_hold = 0;
  int rx_cycles = 0, run_cycles = 0;
  bit measure = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR t=%0t: %s", $time, msg); end
  endtask

  function automatic flit_t mk(int n);
    flit_t f;
    f.head = n[0];
    f.tail = n[1];
    f.data = {32'(n), 96'(n) * 96'h1234_5678_9ABC_DEF0_1357};
    return f;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      bit pop;
      // register model: pop, then check the popped flit
      pop = m_reg && ($urandom_range(99) < pop_pct);
      if (pop) begin
        check(reg_q == mk(next_rx), "flit lost, duplicated or reordered");
        next_rx++;
        if (measure) rx_cycles++;
      end
      if (measure) run_cycles++;
      in_valid  = ann[1];
      in_flit   = ann[1] ? mk(next_tx) : '0;
      vc_en     = !full && ($urandom_range(99) < send_pct);
      out_ready = !m_reg || pop;
      reg_full  = m_reg;
      rel_stage = {S{out_ready}};
      #1;
      if (in_valid && hold == '0 && out_ready) begin
        check(out_valid && out_flit == in_flit, "uncongested flit must pass the link in one cycle");
      end
      if (in_valid) next_tx++;
      if (out_ready) begin
        m_reg = out_valid;
        if (out_valid) reg_q = out_flit;
      end
      if ($countones(hold) > max_hold) max_hold = $countones(hold);
      ann[1] = ann[0];
      ann[0] = vc_en;
    end
  end

  initial begin
    in_valid = 0; vc_en = 0; in_flit = '0; out_ready = 1; reg_full = 0; rel_stage = '1;
    ann[0] = 0; ann[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // free-flowing link: one flit per cycle
    repeat (10) @(posedge clk);
    measure = 1;
    repeat (200) @(posedge clk);
    measure = 0;
    check(rx_cycles == run_cycles, "link with an always-emptied register carries one flit per cycle");
    $display("throughput %0d flits in %0d cycles", rx_cycles, run_cycles);
    // congested
    pop_pct = 30;
    repeat (3000) @(posedge clk);
    pop_pct = 70; send_pct = 60;
    repeat (3000) @(posedge clk);
    send_pct = 0; pop_pct = 100;
    repeat (20) @(posedge clk);
    check(next_rx == next_tx && next_tx > 1000, "all flits delivered");
    check(max_hold == S, "every repeater stage held a flit");
    $display("sent %0d received %0d, most stages held %0d", next_tx, next_rx, max_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
