// tb_beam_video_resolutions - the beam imaging chain at the frame sizes of a
// resolution sweep: 720x480, 720x576, 1280x720 and 1920x1080, each with the
// default 64-line remap buffer and 10x10 peak window. Each size runs one frame
// through its own instance (tb_res_run), with every output pixel and frame
// result checked against a model and the frame time reported in clocks.
module tb_beam_video_resolutions;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] done;
  int chk [4], fail [4];
  int checks, failures;

  always #5 clk = ~clk;

  tb_res_run #(.COLS(720),  .ROWS(480))  r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  tb_res_run #(.COLS(720),  .ROWS(576))  r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  tb_res_run #(.COLS(1280), .ROWS(720))  r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  tb_res_run #(.COLS(1920), .ROWS(1080)) r3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  task automatic report();
    checks = 0;
    failures = 0;
    for (int k = 0; k < 4; k++) begin
      checks += chk[k];
      failures += fail[k];
    end
  endtask

  initial begin
    repeat (1920 * 1080 + 200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
