// tb_ucode_sequencer -- checks the micro-program counter against a model
// under random branch requests, targets and resets: reset gives 0 (even
// with a branch pending), a branch loads the target, otherwise the uPC
// counts up by one and wraps from 15 to 0.
module tb_ucode_sequencer;
  int checks = 0, failures = 0;
  int n_branch = 0, n_inc = 0, n_wrap = 0, n_rst = 0;

  logic       clk = 0, rst = 1, branch = 0;
  logic [3:0] target = '0, upc, model;

  ucode_sequencer dut (.clk, .rst, .branch, .target, .upc);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (upc !== model) begin
        failures++;
        $display("FAIL cycle %0d upc=%0d expected %0d", i, upc, model);
      end
      rst    = ($urandom_range(0, 49) == 0);
      branch = ($urandom_range(0, 3) == 0);
      target = 4'($urandom);
      if (rst)         begin model = 0; n_rst++; end
      else if (branch) begin model = target; n_branch++; end
      else begin
        if (model == 4'hf) n_wrap++;
        model = model + 1; n_inc++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_branch == 0 || n_inc == 0 || n_wrap == 0 || n_rst == 0) begin
      failures++;
      $display("FAIL a case never happened: branch %0d inc %0d wrap %0d rst %0d",
               n_branch, n_inc, n_wrap, n_rst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
