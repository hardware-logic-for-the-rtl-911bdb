// readout_system_tb: the read-out drives two real event memories and a small
// buffer that the testbench empties slowly, so the read-out must wait on
// full.  The words that arrive are compared with the expected record, and
// end of busy must come exactly once per event.
module readout_system_tb;
  localparam int NWW = 15, NSW = 17;
  logic clk = 0, rst_n = 0;
  logic start, wsh, ssh, full, wr, eb, act, load, rd_en, empty;
  logic [239:0] wires;
  logic [259:0] stripes;
  logic [15:0] ww, sw, wdat, rdat;
  logic [3:0] lvl;
  int checks = 0, failures = 0, n_stall = 0, n_end = 0;

  always #5 clk = ~clk;
  event_memory #(.W(240)) mw (.clk, .rst_n, .load, .din(wires), .shift(wsh), .q(), .word(ww));
  event_memory #(.W(260)) ms (.clk, .rst_n, .load, .din(stripes), .shift(ssh), .q(), .word(sw));
  readout_system dut (.clk, .rst_n, .start, .track_count(8'd3), .tz_count(4'd5), .tz_found(1'b1),
    .tz_half(1'b0), .tz_z(5'd12), .tz_theta(5'd9), .wire_word(ww), .stripe_word(sw),
    .wire_shift(wsh), .stripe_shift(ssh), .full, .wr_en(wr), .wr_data(wdat), .end_busy(eb), .active(act));
  derand_fifo #(.DEPTH(8)) fifo (.clk, .rst_n, .wr_en(wr), .wr_data(wdat), .full, .rd_en,
    .rd_data(rdat), .empty, .level(lvl));

  always @(posedge clk) if (wr && full) n_stall++;
  always @(posedge clk) if (eb) n_end++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] exp_w [3 + NWW + NSW];
    logic [NWW*16-1:0] wp;
    logic [NSW*16-1:0] sp;
    start = 0; load = 0; rd_en = 0; wires = '0; stripes = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 5; ev++) begin
      int got, ends0;
      @(negedge clk);
      for (int i = 0; i < 240; i += 24) wires[i +: 24] = 24'($urandom);
      for (int i = 0; i < 260; i += 26) stripes[i +: 26] = 26'($urandom);
      wp = (NWW*16)'(wires); sp = (NSW*16)'(stripes);
      exp_w[0] = {4'hE, 12'(ev)}; exp_w[1] = 16'd3; exp_w[2] = {4'd5, 1'b1, 1'b0, 5'd12, 5'd9};
      for (int k = 0; k < NWW; k++) exp_w[3 + k] = wp[k*16 +: 16];
      for (int k = 0; k < NSW; k++) exp_w[3 + NWW + k] = sp[k*16 +: 16];
      load = 1; @(negedge clk); load = 0;
      start = 1; @(negedge clk); start = 0;
      got = 0; ends0 = n_end;
      while (got < 3 + NWW + NSW) begin
        rd_en = !empty && ($urandom_range(0, 3) == 0);
        if (rd_en) begin
          checks++;
          if (rdat !== exp_w[got]) begin failures++; $display("FAIL ev %0d word %0d = %h exp %h", ev, got, rdat, exp_w[got]); end
          got++;
        end
        @(negedge clk);
        rd_en = 0;
      end
      repeat (3) @(negedge clk);
      checks++;
      if (n_end - ends0 != 1 || act || !empty) begin failures++; $display("FAIL end of busy count %0d", n_end - ends0); end
    end
    if (n_stall == 0) begin failures++; $display("FAIL buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
