// tb_spalink: checks the three link types of spalink side by side.
//  * Transceiver link: a 20-bit word held for two CLKFM periods leaves on
//    mgt_txserial LSB first, one bit per clk_ser cycle (clk_ser = 10 x
//    clk_fm), and the unused parallel pins stay low.
//  * Parallel link without clock feedback: the word appears on par_data_p
//    (and its complement on par_data_n) after the next clk_fm edge.
//  * Parallel link with clock feedback: the output register runs on
//    clk_link, here 6 time units after clk_fm, so a word written just after
//    a clk_fm edge is already out after the next clk_link edge, while the
//    link without feedback still shows the previous word.
//  * The forwarded clock of each parallel link follows its own output clock
//    (clk_fm without feedback, clk_link with it).
module tb_spalink;
  logic clk_fm = 1'b0, clk_ser = 1'b0, clk_link = 1'b0;
  logic rst = 1'b1;
  logic [19:0] wm;
  logic [9:0]  wp;
  logic ser_m, ser_x0, ser_x1;
  logic [19:0] pm, nm;
  logic [9:0]  p0, n0, p1, n1;
  logic cm_p, cm_n, c0_p, c0_n, c1_p, c1_n;
  int checks = 0, failures = 0;

  spalink #(.VIRTEXIIPRO_MGT(1'b1), .FS_MULTIPLICATION_FACTOR(20)) dut_mgt (
    .clk_fm, .rst_fm(rst), .clk_ser, .rst_ser(rst), .clk_link, .rst_link(rst),
    .word(wm), .mgt_txserial(ser_m), .par_data_p(pm), .par_data_n(nm), .par_clk_p(cm_p), .par_clk_n(cm_n));
  spalink #(.VIRTEXIIPRO_MGT(1'b0), .FS_MULTIPLICATION_FACTOR(10),
            .OUTPUT_LVDS(1'b1), .EXTERNAL_CLOCK_FEEDBACK(1'b0)) dut_par (
    .clk_fm, .rst_fm(rst), .clk_ser, .rst_ser(rst), .clk_link, .rst_link(rst),
    .word(wp), .mgt_txserial(ser_x0), .par_data_p(p0), .par_data_n(n0), .par_clk_p(c0_p), .par_clk_n(c0_n));
  spalink #(.VIRTEXIIPRO_MGT(1'b0), .FS_MULTIPLICATION_FACTOR(10),
            .OUTPUT_LVDS(1'b1), .EXTERNAL_CLOCK_FEEDBACK(1'b1)) dut_fb (
    .clk_fm, .rst_fm(rst), .clk_ser, .rst_ser(rst), .clk_link, .rst_link(rst),
    .word(wp), .mgt_txserial(ser_x1), .par_data_p(p1), .par_data_n(n1), .par_clk_p(c1_p), .par_clk_n(c1_n));

  always #10 clk_fm = ~clk_fm;          // period 20
  always #1  clk_ser = ~clk_ser;        // period 2, edge-aligned
  initial begin
    #6;
    forever #10 clk_link = ~clk_link;   // period 20, 6 units later
  end

  initial begin
    repeat (100000) @(posedge clk_fm);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transceiver observer: word present at every 20th clk_ser edge
  logic [19:0] loaded [$];
  int scyc = 0;
  always @(posedge clk_ser) begin
    if (!rst) begin
      if (scyc % 20 == 0) loaded.push_back(wm);
      scyc <= scyc + 1;
    end
  end
  always @(negedge clk_ser) begin
    if (!rst && scyc > 0 && (scyc - 1) / 20 < loaded.size()) begin
      checks++;
      if (ser_m != loaded[(scyc - 1) / 20][(scyc - 1) % 20]) failures++;
    end
  end

  initial begin
    logic [9:0] prev;
    wm = 20'($urandom); wp = '0;
    repeat (3) @(posedge clk_fm);
    rst = 1'b0;    // released on the edge: both domains start together
    prev = wp;
    for (int t = 0; t < 4000; t++) begin
      @(posedge clk_fm);
      #1;
      // parallel without feedback captured prev at this edge
      checks += 4;
      if (p0 != prev || n0 != ~prev) failures++;
      if (pm != '0 || nm != '0) failures++;
      if (ser_x0 != 1'b0 || ser_x1 != 1'b0) failures++;
      if (t > 0 && p1 != prev) failures++;
      // clk_fm high, clk_link still low
      checks += 2;
      if (c0_p != 1'b1 || c0_n != 1'b0 || cm_p != 1'b0 || cm_n != 1'b0) failures++;
      if (t > 0 && (c1_p != 1'b0 || c1_n != 1'b1)) failures++;
      // mid-word for the transceiver: change its word every 2 CLKFM periods
      if (t % 2 == 1) wm = 20'($urandom);
      wp = 10'($urandom);
      #7;   // after the clk_link edge, before the next clk_fm edge
      checks += 2;
      if (p1 != wp || n1 != ~wp) failures++;
      if (t > 0 && p0 != prev) failures++;
      checks++;     // both clocks high now
      if (c0_p != 1'b1 || c1_p != 1'b1) failures++;
      prev = wp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
