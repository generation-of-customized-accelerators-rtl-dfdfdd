// tb_lpa_bus_mux: both select values with random bus contents.
module tb_lpa_bus_mux;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic sel, h_en, x_en, m_en;
  logic [3:0] h_we, x_we, m_we;
  word_t h_addr, h_wdata, x_addr, x_wdata, m_addr, m_wdata;
  lpa_bus_mux dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      sel = n[0]; h_en = $urandom; x_en = $urandom; h_we = $urandom; x_we = $urandom;
      h_addr = $urandom; x_addr = $urandom; h_wdata = $urandom; x_wdata = $urandom;
      #1;
      checks++;
      if ({m_en, m_we, m_addr, m_wdata} !== (sel ? {x_en, x_we, x_addr, x_wdata}
                                                 : {h_en, h_we, h_addr, h_wdata})) begin
        failures++; $display("FAIL sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
