// tb_gtx_init_ctrl: the controller against the transceiver model, over 30
// initialisations with different seeds. Each time it checks that aligned
// rises, that the model's barrel shifter is then at the target position, that
// the number of relocks the controller made equals those the model saw, that
// no DRP access starts before the previous one has answered, and that no DRP
// access follows alignment.
module tb_gtx_init_ctrl;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, resetdone, aligned;
  drp_req_t drp_req;
  drp_rsp_t drp_rsp;
  logic [7:0] attempts;
  logic [4:0] bs_pos, model_bs;
  logic [15:0] seed;
  ul_sym_t rx_out;
  int relocks;
  int checks = 0, failures = 0;

  gtx_init_ctrl #(.HOLD_CLKS(8), .SETTLE_CLKS(8)) dut (
    .clk, .rst_n, .resetdone, .drp_req, .drp_rsp, .aligned, .attempts, .bs_pos);
  gtx_rx_model model (
    .clk, .rst_n, .seed, .tx_in('0), .rx_out, .resetdone, .drp_req, .drp_rsp,
    .bs_pos(model_bs), .relocks);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit outstanding = 0;
  int drp_after_align = 0;
  always @(posedge clk) if (rst_n) begin
    if (drp_req.den) begin
      chk(!outstanding, "one DRP access at a time");
      outstanding = 1;
      if (aligned) drp_after_align++;
    end
    if (drp_rsp.drdy) outstanding = 0;
  end

  initial begin
    int first_try = 0, multi = 0;
    for (int run = 0; run < 30; run++) begin
      int n;
      rst_n = 0;
      seed = 16'(run * 7919 + 17);
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      n = 0;
      while (!aligned && n < 200000) begin @(negedge clk); n++; end
      chk(aligned, "aligned");
      chk(model_bs == 5'd0 && bs_pos == 5'd0, "barrel shifter at target");
      chk(int'(attempts) == relocks, "relocks counted");
      if (attempts == 0) first_try++; else multi++;
      repeat (200) @(negedge clk);
      chk(aligned && resetdone, "stays aligned");
    end
    chk(drp_after_align == 0, "no DRP traffic once aligned");
    chk(multi > 0, "relock needed at least once");
    $display("runs aligned first time %0d, after relocks %0d", first_try, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
