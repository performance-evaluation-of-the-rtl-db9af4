// tb_rf_write_mux: every select value with random sources.
module tb_rf_write_mux;
  import nios_pkg::*;
  wb_sel_e sel;
  logic [31:0] alu_result, mem_data, ctl_data, link_addr, wd;
  int checks = 0, failures = 0;

  rf_write_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [31:0] e;
      sel = wb_sel_e'(n % 4);
      alu_result = $urandom; mem_data = $urandom; ctl_data = $urandom; link_addr = $urandom;
      #1;
      case (n % 4)
        0: e = alu_result;
        1: e = mem_data;
        2: e = ctl_data;
        default: e = link_addr;
      endcase
      checks++;
      if (wd !== e) begin failures++; $display("FAIL sel=%0d", n % 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
