// wire_z_decoder_tb: places hits at random distances along the wire,
// derives which diagonal stripes they cross, and checks that the threefold
// coincidence returns the distance; ghost combinations from two hits must
// not appear when the wire did not fire.
module wire_z_decoder_tb;
  logic w;
  logic [5:0] l, r, z;
  logic valid, multi;
  logic [2:0] num;
  int checks = 0, failures = 0;

  wire_z_decoder dut (.wire_hit(w), .left(l), .right(r), .z_hit(z), .z_valid(valid),
                      .z_num(num), .z_multi(multi));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // exhaustive over all inputs against the equation
    for (int v = 0; v < 8192; v++) begin
      int lo;
      {w, l, r} = 13'(v);
      #1;
      lo = -1;
      for (int k = 5; k >= 0; k--) if (w & l[k] & r[k]) lo = k;
      checks++;
      if (z !== ({6{w}} & l & r) || valid !== (lo >= 0) || (lo >= 0 && int'(num) != lo)
          || multi !== ($countones({6{w}} & l & r) > 1)) begin
        failures++; $display("FAIL w=%b l=%b r=%b z=%b", w, l, r, z);
      end
    end
    // one hit at distance k along the wire crosses left stripe k and right stripe k
    for (int k = 0; k < 6; k++) begin
      w = 1; l = 6'(1 << k); r = 6'(1 << k); #1;
      checks++;
      if (!valid || int'(num) != k || multi) begin failures++; $display("FAIL single hit %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
