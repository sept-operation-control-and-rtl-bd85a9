// Testbench of count_compressor: decodes each 12-bit code back to a value and
// checks that it is exact below 256, never above the input, within 1/256 of
// it, and that values above the range saturate to the largest code. Walks
// all powers of two, their neighbours and random values.
`timescale 1ns/1ps
module tb_count_compressor;
  logic [23:0] value;
  logic [11:0] code;
  int checks = 0, failures = 0;

  count_compressor dut (.value, .code);

  function automatic longint decode(input logic [11:0] c);
    if (c[11:8] == 0) return longint'(c[7:0]);
    return longint'(256 + c[7:0]) << (c[11:8] - 1);
  endfunction

  task automatic check(input logic [23:0] v);
    longint d;
    value = v; #1;
    d = decode(code);
    checks++;
    if (v < 256) begin
      if (d != v) begin failures++; $display("%0d -> %h not exact", v, code); end
    end else if (v > 24'd8372224 + 24'd16383) begin
      if (code != 12'hFFF) begin failures++; $display("%0d -> %h not saturated", v, code); end
    end else if (d > v || (v - d) * 256 > v) begin
      failures++; $display("%0d -> %h decodes to %0d", v, code, d);
    end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 24; i++) begin
      check(24'd1 << i); check((24'd1 << i) - 1); check((24'd1 << i) + 1);
    end
    check(24'hFFFFFF);
    check(24'd511); check(24'd512); check(24'd300);
    value = 24'd300; #1;
    checks++; if (code != {4'd1, 8'd44}) begin failures++; $display("300 -> %h", code); end
    value = 24'd1000; #1;   // 1111101000: msb 9 -> e 2, mantissa 11110100
    checks++; if (code != {4'd2, 8'hF4}) begin failures++; $display("1000 -> %h", code); end
    repeat (2000) check(24'($urandom) >> ($urandom % 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
