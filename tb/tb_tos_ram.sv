// tb_tos_ram -- writes every word of the type-of-service RAM through the
// LOD/DON handshake with random octets and reads them back through both
// read ports, against a copy kept in the testbench.
module tb_tos_ram;
  localparam int N = 32;
  localparam int M = $clog2(N);
  logic clk = 0, mr, lod, don;
  logic [M-1:0] addr, rd_addr;
  logic [7:0] data_in, octet_out, rd_data;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  tos_ram #(.N(N)) dut (.clk, .mr, .lod, .addr, .data_in, .don, .octet_out, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 1; lod = 0; addr = 0; rd_addr = 0; data_in = 0;
    repeat (2) @(posedge clk); #1 mr = 0;
    for (int a = 0; a < N; a++) begin
      addr = M'(a); data_in = 8'($urandom); model[a] = data_in;
      lod = 1;
      #1 check(don == 0, "DON low before write");
      @(posedge clk); #1;
      check(don == 1, "DON after write");
      check(octet_out == model[a], "octet_out at written address");
      lod = 0;
      #1 check(don == 0, "DON falls with LOD");
      @(posedge clk); #1;
    end
    for (int a = 0; a < N; a++) begin
      rd_addr = M'(a); addr = M'(N - 1 - a);
      #1 check(rd_data == model[a], "read port");
      check(octet_out == model[N-1-a], "octet_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
