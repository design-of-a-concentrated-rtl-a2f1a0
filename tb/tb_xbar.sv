// tb_xbar: self-checking test of the crossbar, as the 3x3 quadrant crossbar
// and as the 4x4 core crossbar. Random inputs, enables and selections; every
// output must equal the selected input when enabled and zero otherwise.
module tb_xbar;
  localparam int W = 130;

  logic [2:0][W-1:0] in3;
  logic [2:0]        en3;
  logic [2:0][1:0]   sel3;
  logic [2:0][W-1:0] out3;
  logic [3:0][W-1:0] in4;
  logic [3:0]        en4;
  logic [3:0][1:0]   sel4;
  logic [3:0][W-1:0] out4;

  xbar #(.N(3), .M(3), .W(W), .SW(2)) u3 (.in(in3), .out_en(en3), .sel(sel3), .out(out3));
  xbar #(.N(4), .M(4), .W(W), .SW(2)) u4 (.in(in4), .out_en(en4), .sel(sel4), .out(out4));

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, 2'($urandom)};
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin in3[i] = rnd(); sel3[i] = 2'($urandom_range(2)); end
      for (int i = 0; i < 4; i++) begin in4[i] = rnd(); sel4[i] = 2'($urandom_range(3)); end
      en3 = 3'($urandom); en4 = 4'($urandom);
      #1;
      for (int o = 0; o < 3; o++) begin
        checks++;
        if (out3[o] !== (en3[o] ? in3[sel3[o]] : '0)) begin
          failures++; $display("ERROR 3x3 output %0d", o);
        end
      end
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (out4[o] !== (en4[o] ? in4[sel4[o]] : '0)) begin
          failures++; $display("ERROR 4x4 output %0d", o);
        end
      end
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
