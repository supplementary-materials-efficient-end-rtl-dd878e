// tb_history_shift_reg: drives random clear/shift/write patterns into a
// small shift register and compares every entry, every cycle, with an
// array model of the FIFO.
module tb_history_shift_reg;
  localparam int DEPTH = 12;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0, wr0 = 0;
  logic [31:0] d0 = 0, d1 = 0;
  logic [31:0] q [DEPTH+1];
  logic [31:0] model [DEPTH+1];
  int checks = 0, failures = 0, cyc = 0;

  history_shift_reg #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) < 2);
      shift = $urandom_range(0, 1);
      wr0   = $urandom_range(0, 1);
      d0    = $urandom;
      d1    = (cyc % 2) ? $urandom : q[0];
      @(posedge clk);
      if (clear) foreach (model[k]) model[k] = 0;
      else begin
        if (shift) begin
          for (int k = DEPTH; k > 1; k--) model[k] = model[k-1];
          model[1] = d1;
        end
        if (wr0) model[0] = d0;
      end
      #1;
      for (int k = 0; k <= DEPTH; k++) begin
        checks++;
        if (q[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d entry %0d got %h exp %h", cyc, k, q[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
