// tb_data_mem: fills the data memory through its write port, then runs
// random reads and writes against an array model. Reads must be
// combinational (valid before the edge), writes must land at the edge and
// only when WrEn is 1, and address bits 1:0 must be ignored.
module tb_data_mem;
  localparam int WORDS = 256;
  logic        clk = 1'b0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk(clk), .wr_en(wr_en), .adr(adr),
                                 .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      adr = 32'(i * 4); data_in = $urandom; model[i] = data_in;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 4000; n++) begin
      automatic int idx = $urandom_range(0, WORDS - 1);
      wr_en = $urandom_range(0, 1);
      adr = {22'($urandom), 8'(idx), 2'($urandom)};
      data_in = $urandom;
      #1;
      checks++;
      if (data_out !== model[idx]) begin
        failures++;
        $display("FAIL read adr=%h got %h expected %h", adr, data_out, model[idx]);
      end
      @(posedge clk);
      if (wr_en) model[idx] = data_in;
      #1;
      checks++;
      if (data_out !== model[idx]) begin
        failures++;
        $display("FAIL after edge adr=%h got %h expected %h", adr, data_out, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
