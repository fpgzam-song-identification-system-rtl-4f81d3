// tb_addr_mux: random check of the address multiplexer at two widths.
module tb_addr_mux;
  int checks = 0, failures = 0;
  logic       w9, w5;
  logic [8:0] wa9, ra9, a9;
  logic [4:0] wa5, ra5, a5;

  addr_mux #(.WIDTH(9)) dut9 (.write(w9), .waddr(wa9), .raddr(ra9), .addr(a9));
  addr_mux #(.WIDTH(5)) dut5 (.write(w5), .waddr(wa5), .raddr(ra5), .addr(a5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      {w9, w5} = 2'($urandom);
      wa9 = 9'($urandom); ra9 = 9'($urandom);
      wa5 = 5'($urandom); ra5 = 5'($urandom);
      #1;
      checks += 2;
      if (a9 !== (w9 ? wa9 : ra9)) begin failures++; $display("mux9 w=%b got %0d", w9, a9); end
      if (a5 !== (w5 ? wa5 : ra5)) begin failures++; $display("mux5 w=%b got %0d", w5, a5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
