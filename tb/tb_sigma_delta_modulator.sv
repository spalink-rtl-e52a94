// tb_sigma_delta_modulator: checks the first- and second-order modulators.
//  * First order against an accumulate-and-compare model
//    s[n] = s[n-1] + x[n] - y[n-1]*FS, y[n] = (s[n] >= 0), bit-exact, with
//    random and slowly varying inputs.
//  * Second order against a model of (1 - z^-1)**2 error feedback with the
//    quantiser input limited to [-4FS, 4FS-1], bit-exact, with the overload
//    flag.
//  * For both orders, the mean of the bitstream over 4096 clocks follows a
//    DC input within 1/256 of full scale.
//  * The output bit for an input sampled at one edge appears after that edge.
module tb_sigma_delta_modulator;
  localparam int W = 10;
  localparam int FS = 1 << (W - 1);
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] x;
  logic y1, y2, ov1, ov2;
  int checks = 0, failures = 0;
  int overloads = 0;

  sigma_delta_modulator #(.ORDER(1), .WIDTH(W)) dut1 (.clk, .rst, .din(x), .dout(y1), .overload(ov1));
  sigma_delta_modulator #(.ORDER(2), .WIDTH(W)) dut2 (.clk, .rst, .din(x), .dout(y2), .overload(ov2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int s1, yv1;            // first order: integrator, last output value
  int e1, e2;             // second order: past quantisation errors

  task automatic model_reset();
    s1 = 0; yv1 = 0; e1 = 0; e2 = 0;
  endtask

  task automatic step(int xi, output bit m1, output bit m2, output bit mov);
    int w, yv;
    s1 = s1 + xi - yv1;
    m1 = (s1 >= 0);
    yv1 = m1 ? FS : -FS;
    w = xi - 2 * e1 + e2;
    mov = 0;
    if (w > 4 * FS - 1) begin w = 4 * FS - 1; mov = 1; end
    if (w < -4 * FS)    begin w = -4 * FS;    mov = 1; end
    m2 = (w >= 0);
    yv = m2 ? FS : -FS;
    e2 = e1;
    e1 = yv - w;
  endtask

  task automatic apply(int xi, bit check_dc, output int ones1, output int ones2);
    bit m1, m2, mov;
    x = W'(xi);
    step(xi, m1, m2, mov);
    @(posedge clk); #1;
    checks += 3;
    if (y1 != m1) failures++;
    if (y2 != m2) failures++;
    if (ov2 != mov) failures++;
    if (ov2) overloads++;
    ones1 = int'(y1); ones2 = int'(y2);
  endtask

  initial begin
    int o1, o2, sum1, sum2;
    real mean1, mean2;
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    model_reset();
    // random input, full range
    for (int i = 0; i < 20000; i++) apply($urandom_range(0, 2*FS-1) - FS, 0, o1, o2);
    // slow sine
    for (int i = 0; i < 20000; i++)
      apply($rtoi(0.9 * (FS-1) * $sin(2.0*3.14159265*i/1000.0)), 0, o1, o2);
    // DC levels: mean of the +-1 stream = x / FS
    for (int d = -400; d <= 400; d += 100) begin
      for (int i = 0; i < 512; i++) apply(d, 0, o1, o2);   // settle
      sum1 = 0; sum2 = 0;
      for (int i = 0; i < 4096; i++) begin
        apply(d, 0, o1, o2);
        sum1 += o1; sum2 += o2;
      end
      mean1 = (2.0 * sum1 - 4096.0) / 4096.0;
      mean2 = (2.0 * sum2 - 4096.0) / 4096.0;
      checks += 2;
      if ((mean1 - real'(d) / FS) > 1.0/256 || (real'(d) / FS - mean1) > 1.0/256) begin
        failures++; $display("order1 DC %0d: mean %f", d, mean1);
      end
      if ((mean2 - real'(d) / FS) > 1.0/256 || (real'(d) / FS - mean2) > 1.0/256) begin
        failures++; $display("order2 DC %0d: mean %f", d, mean2);
      end
    end
    // hard overload: full-scale square wave
    for (int i = 0; i < 2000; i++) apply(((i / 3) % 2) ? FS - 1 : -FS, 0, o1, o2);
    checks++;
    if (overloads == 0) begin failures++; $display("second-order clamp never used"); end
    $display("second-order clamps: %0d", overloads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
