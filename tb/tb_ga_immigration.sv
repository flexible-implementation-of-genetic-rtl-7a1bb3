// tb_ga_immigration: checks individual exchange (W=8, BEATS=4, PERIOD=3).
// The own stream sends chromosomes with long gaps; the neighbour stream sends
// chromosomes continuously at another phase. Words carry a tag (bit 7: own
// or neighbour, bits 6..2: serial number, bits 1..0: word index). Expected:
// every third own individual (PERIOD) is replaced, entirely, by one complete
// neighbour chromosome sent after the counter expired; all others pass
// unchanged; address and fitness are always the own individual's; no latency.
// The periodic exchange follows the document; keeping the own address and
// fitness is this design's own choice.
module tb_ga_immigration;
  localparam int W = 8, BEATS = 4, AW = 6, FW = 16, PERIOD = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic own_strobe = 0, own_first = 0, own_last = 0;
  logic [W-1:0] own_gene;
  logic [AW-1:0] own_addr;
  logic [FW-1:0] own_fit;
  logic oth_strobe = 0, oth_first = 0, oth_last = 0;
  logic [W-1:0] oth_gene;
  logic o_strobe, o_first, o_last, migr_pulse;
  logic [W-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;

  ga_immigration #(.W(W), .BEATS(BEATS), .AW(AW), .FW(FW), .CW(16), .PERIOD(PERIOD)) dut (.*);

  int checks = 0, failures = 0, migrations = 0, pulses = 0;
  int oth_serial = 0;
  logic done = 0;

  always @(posedge clk) if (!rst && migr_pulse) pulses++;

  // neighbour: continuous stream
  initial begin
    @(negedge clk);
    while (rst) @(negedge clk);
    repeat (2) @(negedge clk);
    while (!done) begin
      for (int k = 0; k < BEATS; k++) begin
        oth_strobe = 1; oth_first = (k == 0); oth_last = (k == BEATS - 1);
        oth_gene = W'({1'b1, 5'(oth_serial), 2'(k)});
        @(negedge clk);
      end
      oth_serial++;
      oth_strobe = 0;
      if (oth_serial % 2 == 0) @(negedge clk);
    end
  end

  initial begin
    int serial_seen[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 1; n <= 30; n++) begin
      int tag0;
      logic sub;
      for (int k = 0; k < BEATS; k++) begin
        own_strobe = 1; own_first = (k == 0); own_last = (k == BEATS - 1);
        own_gene = W'({1'b0, 5'(n), 2'(k)}); own_addr = AW'(n); own_fit = FW'(n * 3);
        #1;
        checks++;
        if (o_strobe !== 1'b1 || o_first !== own_first || o_last !== own_last ||
            o_addr !== own_addr || o_fit !== own_fit || o_gene[1:0] !== 2'(k)) begin
          failures++; $display("pass-through fields wrong");
        end
        if (k == 0) begin tag0 = int'(o_gene[7:2]); sub = o_gene[7]; end
        else if (int'(o_gene[7:2]) != tag0) begin failures++; $display("mixed chromosome"); end
        @(negedge clk);
      end
      own_strobe = 0; own_first = 0; own_last = 0;
      checks++;
      if (sub !== (n % PERIOD == 0)) begin
        failures++; $display("individual %0d: substituted=%0d", n, sub);
      end
      if (sub) begin
        migrations++;
        checks++;
        if (!sub || serial_seen.size() > 0 && tag0[4:0] == serial_seen[$]) begin
          failures++; $display("immigrant %0d not a fresh neighbour chromosome", tag0[4:0]);
        end
        serial_seen.push_back(tag0[4:0]);
      end else begin
        checks++;
        if (tag0 != n) begin failures++; $display("own chromosome altered"); end
      end
      repeat (3 * BEATS) @(negedge clk);
    end
    done = 1;
    @(negedge clk);
    checks++;
    if (migrations != 10 || pulses != migrations) begin
      failures++; $display("migrations %0d pulses %0d", migrations, pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
