// tb_func_addr_decode: exhaustive check of the function address decoder
// over all 256 thumbwheel settings with the store strobe low and high.
module tb_func_addr_decode;
  logic [7:0] addr_bcd;
  logic store_wr;
  logic [3:0] addr;
  logic valid, ld_tod, ld_ref, ld_ctrl;
  logic [3:0] ld_time;
  int checks = 0, failures = 0;

  func_addr_decode dut (.addr_bcd, .store_wr, .addr, .valid, .ld_tod, .ld_ref, .ld_ctrl, .ld_time);

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int tens = 0; tens < 16; tens++) begin
        for (int units = 0; units < 16; units++) begin
          int v;
          logic ev;
          addr_bcd = {4'(tens), 4'(units)};
          store_wr = 1'(s);
          #1;
          v = tens * 10 + units;
          ev = (tens <= 9) && (units <= 9) && (v <= 15);
          checks++;
          if (valid !== ev) begin failures++; $display("valid %h", addr_bcd); end
          if (ev) begin
            checks++;
            if (addr !== 4'(v)) begin failures++; $display("addr %h -> %0d", addr_bcd, addr); end
          end
          checks++;
          if (ld_tod !== (s == 1 && ev && v == 5) || ld_ref !== (s == 1 && ev && v == 6) ||
              ld_ctrl !== (s == 1 && ev && v == 7)) begin
            failures++; $display("load strobes wrong for %h", addr_bcd);
          end
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (ld_time[i] !== (s == 1 && ev && v == 8 + i)) begin
              failures++; $display("ld_time[%0d] wrong for %h", i, addr_bcd);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
