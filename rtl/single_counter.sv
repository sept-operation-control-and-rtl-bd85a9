// Single event counter: counts every event detected on one selected channel
// (main channel = centre segment, or coincidence channel = guard ring) of one
// PDFE, before any filtering.
//
// sel[1:0] is the PDFE and sel[2] the channel (0 main, 1 coincidence), as in
// the low bits of cGetSingle (01001-UU). Counting happens only while
// count_en is high (during an accumulation). cGetSingle reads the count of
// the current selection (the command interpreter samples count when it
// decodes the command) and then, through sel_load, selects the channel
// named by the command and restarts the count at zero. So each cGetSingle
// returns the count of the channel chosen by the previous one, as in the
// instrument's measurement cycle. The count saturates at 2^SW-1.
// SW = 23 bits follows the instrument's data budget.
module single_counter #(
  parameter int SW = 23
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          count_en,
  input  logic [3:0]    hit_main,
  input  logic [3:0]    hit_gr,
  input  logic          sel_load,
  input  logic [2:0]    sel_new,
  output logic [2:0]    sel,
  output logic [SW-1:0] count
);
  logic hit;
  assign hit = sel[2] ? hit_gr[sel[1:0]] : hit_main[sel[1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel   <= '0;
      count <= '0;
    end else if (sel_load) begin
      sel   <= sel_new;
      count <= '0;
    end else if (count_en && hit && count != '1) begin
      count <= count + 1'b1;
    end
  end
endmodule
