// tb_register_file: checks the 32 x 32-bit register file against an array
// model. After reset every register must read 0. Random writes (RegWr
// random) and random read addresses follow; both read ports are compared
// with the model each cycle, register 0 must stay 0, and a register written
// in a cycle must show its old value until the clock edge.
module tb_register_file;
  logic        clk = 1'b0, rst_n, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst_n(rst_n), .we(we), .rw(rw), .bus_w(bus_w),
                     .ra(ra), .rb(rb), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (bus_a !== model[ra] || bus_b !== model[rb]) begin
      failures++;
      $display("FAIL %s ra=%0d busA=%h (exp %h) rb=%0d busB=%h (exp %h)",
               what, ra, bus_a, model[ra], rb, bus_b, model[rb]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    rst_n = 1'b0; we = 1'b0; rw = '0; bus_w = '0; ra = '0; rb = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); #1;
      compare("after reset");
    end
    for (int n = 0; n < 3000; n++) begin
      we = ($urandom_range(0, 3) != 0);
      rw = 5'($urandom);
      bus_w = $urandom;
      ra = (n % 4 == 0) ? rw : 5'($urandom);   // often read the register being written
      rb = 5'($urandom);
      #1;
      compare("before edge");
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      #1;
      compare("after edge");
    end
    // reset clears everything again
    rst_n = 1'b0; we = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(r); #1;
      compare("after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
