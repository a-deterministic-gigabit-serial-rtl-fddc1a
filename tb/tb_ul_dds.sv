// tb_ul_dds: sends new frequency halves between updates and checks that the
// frequency changes only at the update and that the phase advances by the
// applied frequency every clock (computed here). Then sends the latch event,
// checks the latched phase, and, with is_ref high, the two report words and
// their hand-off under a stalling sink; with is_ref low, no report.
module tb_ul_dds;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, update, evt_valid, data_valid, is_ref, rep_valid, rep_ready;
  logic [15:0] evt_code;
  ul_word_t data_word, rep_word;
  logic [31:0] phase, freq, latched;
  int checks = 0, failures = 0;
  logic [31:0] ref_phase, ref_freq;

  ul_dds dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference accumulator, advanced with the same rule at every edge
  task automatic tick();
    @(posedge clk);
    ref_phase = ref_phase + ref_freq;
    if (update) ref_freq = pending;
    @(negedge clk);
    update = 0; evt_valid = 0; data_valid = 0;
    chk(phase == ref_phase && freq == ref_freq, "phase/freq");
  endtask
  logic [31:0] pending;

  initial begin
    int reports;
    reports = 0;
    update = 0; evt_valid = 0; data_valid = 0; evt_code = 0; data_word = '0;
    is_ref = 0; rep_ready = 0;
    ref_phase = 0; ref_freq = 0; pending = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      logic [31:0] f;
      f = $urandom;
      data_valid = 1; data_word = '{PID_FHI, f[31:16]}; pending[31:16] = f[31:16];
      tick();
      repeat (5) tick();
      chk(freq != f || f == ref_freq, "not applied before update");
      data_valid = 1; data_word = '{PID_FLO, f[15:0]}; pending[15:0] = f[15:0];
      tick();
      data_valid = 1; data_word = '{16'h0123, 16'hFFFF};  // unrelated PID
      tick();
      repeat (7) tick();
      update = 1;
      tick();
      chk(freq == f, "applied at update");
      repeat (20) tick();
      // phase latch
      is_ref = p[0];
      begin
        logic [31:0] exp_latch;
        exp_latch = ref_phase;
        evt_valid = 1; evt_code = EVT_LATCH;
        tick();
        chk(latched == exp_latch, "latched phase");
        if (is_ref) begin
          chk(rep_valid && rep_word == '{PID_PHI, exp_latch[31:16]}, "report hi");
          repeat (3) tick();
          chk(rep_valid && rep_word == '{PID_PHI, exp_latch[31:16]}, "report held while stalled");
          rep_ready = 1;
          tick();
          chk(rep_valid && rep_word == '{PID_PLO, exp_latch[15:0]}, "report lo");
          tick();
          rep_ready = 0;
          chk(!rep_valid, "report done");
          reports++;
        end else begin
          chk(!rep_valid, "no report when not reference");
        end
      end
    end
    chk(reports == 10, "reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
