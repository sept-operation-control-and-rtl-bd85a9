// Testbench of event_filter: all 32 input combinations against the rule
// table of the four filter modes (00 pass, 01 partner coincidence,
// 10 full anticoincidence, 11 partner coincidence with guard-ring veto).
`timescale 1ns/1ps
module tb_event_filter;
  logic ev_valid, ev_gr, partner_valid, accept;
  logic [1:0] mode;
  int checks = 0, failures = 0;

  event_filter dut (.ev_valid, .ev_gr, .partner_valid, .mode, .accept);

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic expect_acc;
      {mode, ev_valid, ev_gr, partner_valid} = 5'(v);
      #1;
      case (mode)
        2'b00: expect_acc = ev_valid;
        2'b01: expect_acc = ev_valid && partner_valid;
        2'b10: expect_acc = ev_valid && !ev_gr && !partner_valid;
        2'b11: expect_acc = ev_valid && !ev_gr && partner_valid;
      endcase
      checks++;
      if (accept !== expect_acc) begin
        failures++; $display("mode %b valid %b gr %b partner %b: accept %b", mode, ev_valid, ev_gr, partner_valid, accept);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
