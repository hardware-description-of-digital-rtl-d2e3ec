// tb_tap_delay_line - self-checking test of the sample shift register.
//
// Drives random samples with a random enable pattern into a 4-tap line and
// keeps its own history of the accepted samples; every cycle each tap must
// equal the sample accepted k strobes earlier (tap 0 the present input).
// Also checks that reset clears the stored taps.
module tb_tap_delay_line;
  localparam int W = 8;
  localparam int TAPS = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] din;
  logic signed [W-1:0] taps [TAPS];

  int checks = 0, failures = 0;
  logic signed [W-1:0] hist [TAPS];   // hist[k] = sample accepted k strobes ago (k>=1)

  tap_delay_line #(.W(W), .TAPS(TAPS)) dut (.clk, .rst_n, .en, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_taps();
    if (taps[0] !== din) begin
      failures++; $display("tap0 mismatch %0d vs %0d", taps[0], din);
    end
    checks++;
    for (int k = 1; k < TAPS; k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        $display("tap%0d mismatch: got %0d expected %0d", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; din = 8'sd55;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    check_taps();   // cleared by reset
    for (int n = 0; n < 1000; n++) begin
      din = W'($urandom);
      en  = ($urandom_range(0, 3) != 0);
      #1 check_taps();
      @(posedge clk);
      if (en) begin
        for (int k = TAPS - 1; k > 1; k--) hist[k] = hist[k-1];
        hist[1] = din;
      end
      #1;
    end
    // reset in the middle clears the line
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    check_taps();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
