// tb_sfr_decoder: sweeps all 128 extension SFR addresses and checks which
// device is selected, that sfr_load reaches only that device and that the
// read data comes from it (each device model returns its own constant).
module tb_sfr_decoder;
  import agri_pkg::*;
  logic [6:0] sfr_addr;
  logic sfr_load;
  logic [7:0] sfr_data_out;
  logic [5:0] dev_load;
  logic [7:0] sys_data = 8'h11, wdt_data = 8'h22, adc_data = 8'h33, pwm_data = 8'h44,
              rtc_data = 8'h55, spi_data = 8'h66;
  int checks = 0, failures = 0;
  sfr_decoder dut (.*);
  function automatic int dev_of(input logic [7:0] a);
    case (a)
      8'hE9, 8'hEA, 8'hF1, 8'hF2: return 0;
      8'hA9, 8'hAA: return 1;
      8'hB1, 8'hB2, 8'hB3: return 2;
      8'hA2, 8'hA3, 8'hA4, 8'hA5, 8'hA6, 8'hA7: return 3;
      8'hB4, 8'hB5, 8'hB6, 8'hB7: return 4;
      8'hC1, 8'hC2, 8'hC3: return 5;
      default: return -1;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 128; i++) begin
      int d;
      sfr_addr = 7'(i); sfr_load = 1'b1; #1;
      d = dev_of(8'h80 + 8'(i));
      checks += 2;
      if (d < 0) begin
        if (dev_load != 0 || sfr_data_out != 0) failures += 2;
      end else begin
        if (dev_load != 6'(1 << d)) failures++;
        if (sfr_data_out != 8'(8'h11 * (d + 1))) failures++;
      end
      sfr_load = 1'b0; #1; checks++; if (dev_load != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
