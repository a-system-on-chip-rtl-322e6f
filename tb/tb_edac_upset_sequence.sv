// tb_edac_upset_sequence: directed upset-injection sequence on the EDAC core.
//
// Replays the classic bench demonstration of a SECDED memory guard with one
// fixed word, D1..D5 = 1 and D6..D11 = 0 (datain = 11'h01F), whose stored
// codeword is 16'h01FE (bits P1..P16 read left to right: 0111111110000000):
//   1. clear held, every output and the stored word must read zero;
//   2. clear released, the word is stored and read back clean (NE);
//   3. each of the 16 stored bits is flipped in turn: SEC, data unchanged;
//   4. each adjacent pair of bits (0/1 .. 14/15) and the outermost pair
//      (0/15) is flipped: DED, data cleared;
//   5. clear asserted again between edges: outputs zero at once;
//   6. clear released: NE with the word again.
// Each result is checked one clock after the upset is applied, the core's
// read latency.
module tb_edac_upset_sequence;

  logic        clk = 1'b0;
  logic        clr_n;
  logic [10:0] datain;
  logic [15:0] seu_mask;
  logic [15:0] data_to_memory;
  logic [10:0] dataout;
  logic        ne, sec, ded;
  int checks = 0, failures = 0;

  localparam logic [10:0] WORD     = 11'h01F;
  localparam logic [15:0] CODEWORD = 16'h01FE;

  edac_top dut (.clk(clk), .clr_n(clr_n), .datain(datain), .seu_mask(seu_mask),
                .data_to_memory(data_to_memory), .dataout(dataout),
                .ne(ne), .sec(sec), .ded(ded));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t mask=%h mem=%h out=%h ne=%b sec=%b ded=%b",
               what, $time, seu_mask, data_to_memory, dataout, ne, sec, ded);
    end
  endtask

  // apply an upset pattern for one cycle and look at the result
  task automatic read_with(input logic [15:0] mask, output logic [10:0] d,
                           output logic [2:0] flags);
    seu_mask = mask;
    @(posedge clk); #0.5;
    d = dataout;
    flags = {ne, sec, ded};
    @(negedge clk);
  endtask

  initial begin
    #2000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] d;
    logic [2:0]  f;
    clr_n = 1'b0; datain = WORD; seu_mask = '0;
    repeat (3) @(negedge clk);
    check(dataout == '0 && {ne, sec, ded} == 3'b000 && data_to_memory == '0, "held clear");
    clr_n = 1'b1;
    @(posedge clk); #0.5;
    check(data_to_memory == CODEWORD, "stored codeword");
    @(negedge clk);
    read_with('0, d, f);
    check(d == WORD && f == 3'b100, "clean read");
    for (int b = 0; b < 16; b++) begin
      read_with(16'(1) << b, d, f);
      check(d == WORD && f == 3'b010, $sformatf("single upset bit %0d", b));
    end
    for (int b = 0; b < 15; b++) begin
      read_with(16'(3) << b, d, f);
      check(d == '0 && f == 3'b001, $sformatf("double upset bits %0d,%0d", b, b + 1));
    end
    read_with(16'h8001, d, f);
    check(d == '0 && f == 3'b001, "double upset bits 0,15");
    seu_mask = '0;
    #0.25 clr_n = 1'b0;
    #0.25;
    check(dataout == '0 && {ne, sec, ded} == 3'b000, "clear between edges");
    @(negedge clk);
    clr_n = 1'b1;
    @(negedge clk);
    read_with('0, d, f);
    check(d == WORD && f == 3'b100, "clean read after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
