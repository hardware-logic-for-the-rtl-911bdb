// theta_z_counter_tb: random hit vectors during a scan; the count of selected
// hits (saturating at 15), the scan window and the first-hit register are
// compared with a model.
module theta_z_counter_tb;
  localparam int NT = 17;
  logic clk = 0, rst_n = 0;
  logic clear, step;
  logic [6:0] z;
  logic [NT-1:0] h0, h1, sel;
  logic [3:0] count;
  logic found, fhalf;
  logic [6:0] fz;
  logic [4:0] fth;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;
  theta_z_counter #(.ZW(7)) dut (.clk, .rst_n, .clear, .step, .z, .hit0(h0), .hit1(h1),
    .theta_sel(sel), .count, .found, .found_half(fhalf), .found_z(fz), .found_theta(fth));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; step = 0; z = '0; h0 = '0; h1 = '0; sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (60) begin
      int m_cnt, m_z, m_th, m_h;
      bit m_f;
      int dens;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      sel = NT'($urandom) | NT'($urandom);
      dens = $urandom_range(1, 3);
      m_cnt = 0; m_f = 0; m_z = 0; m_th = 0; m_h = 0;
      for (int t = 0; t < 40; t++) begin
        z = 7'(t); step = 1;
        h0 = '0; h1 = '0;
        if ($urandom_range(0, 3) < dens) begin
          h0[$urandom_range(0, NT - 1)] = 1;
          if ($urandom_range(0, 1)) h1[$urandom_range(0, NT - 1)] = 1;
        end
        if (t < 25) begin
          m_cnt += $countones(h0 & sel) + $countones(h1 & sel);
          if (m_cnt > 15) m_cnt = 15;
          if (!m_f && ((h0 & sel) != 0 || (h1 & sel) != 0)) begin
            m_f = 1; m_z = t;
            if ((h0 & sel) != 0) begin
              m_h = 0;
              for (int i = NT - 1; i >= 0; i--) if (h0[i] & sel[i]) m_th = i;
            end else begin
              m_h = 1;
              for (int i = NT - 1; i >= 0; i--) if (h1[i] & sel[i]) m_th = i;
            end
          end
        end
        @(negedge clk);
      end
      step = 0;
      checks++;
      if (int'(count) != m_cnt || found !== m_f) begin
        failures++; $display("FAIL count %0d exp %0d found %b exp %b", count, m_cnt, found, m_f);
      end
      if (m_f) begin
        checks++;
        if (int'(fz) != m_z || int'(fth) != m_th || int'(fhalf) != m_h) begin
          failures++; $display("FAIL first hit z=%0d/%0d th=%0d/%0d h=%0d/%0d", fz, m_z, fth, m_th, fhalf, m_h);
        end
      end
      if (m_cnt == 15) n_sat++;
    end
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
