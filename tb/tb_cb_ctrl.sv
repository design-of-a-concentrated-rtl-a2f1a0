// tb_cb_ctrl: self-checking test of the channel-buffer control block.
//
// The testbench plays both neighbours of a link: an upstream router that
// announces each flit (vc_en) and puts it on the link two cycles later,
// only while full is low, and a downstream input register that is emptied at
// random. A reference model counts the flits held in the link and checks,
// every cycle, the stage control lines (held flits must sit in stages
// 0..n-1), where an arriving flit stops, whether it passes straight into the
// register, and the full signal (set exactly when register, held flits and
// flits on their way add up to STAGES + 1) and the two room flags (space
// for one / two packets of P flits, P = 2 here). A directed part releases only
// stage 0 and checks that the flit behind stays held.
module tb_cb_ctrl;
  localparam int S = 4;
  localparam int P = 2;

  logic clk = 0, rst_n = 0;
  logic vc_en, arrive, reg_full, reg_take;
  logic [S-1:0] rel_stage, hold, shift, capture;
  logic pass, full;
  logic [1:0] room;

  cb_ctrl #(.STAGES(S), .PKT(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_held = 0;      // model: flits held in the link
  bit m_reg = 0;       // model: register occupied
  int pend = 0;        // model: announced flits still on their way
  bit ann_pipe [2];    // announcements travelling to the link
  int holds_seen = 0, fulls_seen = 0, passes_seen = 0, rooms_seen = 0;
  bit pop;
  bit directed = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR t=%0t: %s (hold=%b cap=%b pass=%b full=%b n=%0d reg=%0d pend=%0d)",
               $time, msg, hold, capture, pass, full, n_held, m_reg, pend);
    end
  endtask

  function automatic logic [S-1:0] therm(int n);
    return S'((1 << n) - 1);
  endfunction

  always @(negedge clk) begin
    if (rst_n && !directed) begin
      int occ;
      occ = int'(m_reg) + n_held + pend;
      check(hold == therm(n_held), "hold lines do not match the held flits");
      check(full == (occ >= S + 1), "full wrong");
      check(room[0] == (occ + P <= S + 1), "room for one packet wrong");
      check(room[1] == (occ + 2 * P <= S + 1), "room for two packets wrong");
      if (room == 2'b01) rooms_seen++;
      if (full) fulls_seen++;
      if (n_held > 0) holds_seen++;
      // drive this cycle
      arrive    = ann_pipe[1];
      vc_en     = !full && ($urandom_range(99) < 70) && (occ + 0 < S + 1);
      pop       = m_reg && ($urandom_range(99) < 35);
      reg_take  = !m_reg || pop;
      reg_full  = m_reg;
      rel_stage = {S{reg_take}};
      #1;
      // expected behaviour
      begin
        int moved;
        bit exp_pass;
        moved    = (n_held > 0 && reg_take) ? 1 : 0;
        exp_pass = arrive && n_held == 0 && reg_take;
        check(pass == exp_pass, "pass wrong");
        if (exp_pass) passes_seen++;
        check(shift == (moved ? therm(n_held - 1) : '0), "shift wrong");
        if (arrive && !exp_pass) check(capture == S'(1 << (n_held - moved)), "flit stopped at wrong stage");
        else                     check(capture == '0, "capture without a stopping flit");
        // update model
        if (reg_take) m_reg = (n_held > 0) || exp_pass;
        n_held = n_held - moved + ((arrive && !exp_pass) ? 1 : 0);
        pend   = pend + int'(vc_en) - int'(arrive);
        ann_pipe[1] = ann_pipe[0];
        ann_pipe[0] = vc_en;
      end
    end
  end

  initial begin
    vc_en = 0; arrive = 0; reg_full = 0; reg_take = 1; rel_stage = '1;
    ann_pipe[0] = 0; ann_pipe[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    // let the random traffic stop and drain
    directed = 1;
    @(negedge clk);
    vc_en = 0; arrive = 0;
    // directed: fill 2 stages with the register full, then release stage 0 only
    reg_full = 1; reg_take = 0; rel_stage = '1;
    repeat (4) @(negedge clk);  // empty whatever is left
    reg_full = 0; reg_take = 1; rel_stage = '1;
    repeat (S + 2) @(negedge clk);
    reg_full = 1; reg_take = 0; vc_en = 1;
    @(negedge clk); vc_en = 1;
    @(negedge clk); vc_en = 0; arrive = 1;
    @(negedge clk); arrive = 1;
    @(negedge clk); arrive = 0;
    #1 check(hold == 4'b0011, "two flits held in stages 0 and 1");
    reg_take = 1; rel_stage = 4'b0001;
    #1 check(shift == '0, "stage 1 must not move when only stage 0 is released");
    @(negedge clk);
    #1 check(hold == 4'b0010, "stage 1 still held, stage 0 free");
    reg_take = 1; rel_stage = 4'b0010; reg_full = 0;
    #1 check(shift == 4'b0001, "stage 1 moves into the free stage 0");
    @(negedge clk);
    #1 check(hold == 4'b0001, "flit now in stage 0");
    check(holds_seen > 0 && fulls_seen > 0 && passes_seen > 0 && rooms_seen > 0,
          "hold, full, pass and room all exercised");
    $display("held %0d cycles, full %0d cycles, passes %0d", holds_seen, fulls_seen, passes_seen);
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
