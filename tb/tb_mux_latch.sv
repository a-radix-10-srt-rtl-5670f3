// tb_mux_latch: random one-hot (or zero) selections with random enables;
// the register must hold the selected input after an enabled edge, zero when
// nothing is selected, and keep its value when not enabled. Reset clears it.
module tb_mux_latch;
  localparam int WD = 70, NI = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [NI-1:0] sel = '0;
  logic [WD-1:0] din [NI];
  logic [WD-1:0] q, model;
  int checks = 0, failures = 0;

  mux_latch #(.WIDTH(WD), .NIN(NI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NI; i++) din[i] = '0;
    model = '0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (q != '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int k;
      for (int i = 0; i < NI; i++) din[i] = {6'($urandom), $urandom, $urandom};
      k   = $urandom_range(NI);
      sel = (k == NI) ? '0 : NI'(1) << k;
      en  = 1'($urandom);
      if (en) model = (k == NI) ? '0 : din[k];
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
