// tb_i2c_mux: exhaustive check of the DAC bus multiplexer. For every select
// value and every combination of master enables and bus levels, only the
// selected bus may be pulled low and the master must see the selected SDA.
module tb_i2c_mux;
  logic [1:0] sel;
  logic       m_scl_oe, m_sda_oe, m_sda_i;
  logic [3:0] ch_scl_oe, ch_sda_oe, ch_sda_i;
  int checks = 0, failures = 0;

  i2c_mux #(.N(4)) dut (.sel, .m_scl_oe, .m_sda_oe, .m_sda_i, .ch_scl_oe, .ch_sda_oe, .ch_sda_i);

  initial begin
    for (int s = 0; s < 4; s++)
      for (int oe = 0; oe < 4; oe++)
        for (int lv = 0; lv < 16; lv++) begin
          logic [3:0] exp_scl, exp_sda;
          sel = 2'(s); m_scl_oe = oe[0]; m_sda_oe = oe[1]; ch_sda_i = 4'(lv);
          #1;
          exp_scl = '0; exp_sda = '0;
          exp_scl[s] = oe[0];
          exp_sda[s] = oe[1];
          checks++;
          if (ch_scl_oe !== exp_scl || ch_sda_oe !== exp_sda || m_sda_i !== lv[s]) begin
            failures++;
            $display("FAIL sel=%0d oe=%0d lv=%0d: scl=%b sda=%b m_sda_i=%b", s, oe, lv,
                     ch_scl_oe, ch_sda_oe, m_sda_i);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
