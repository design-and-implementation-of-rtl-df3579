// tb_mapper_decoder: exhaustive check of the one-hot mapper decoder for
// BPSK, QPSK and 16-QAM, plus the published QPSK truth table row by row.
module tb_mapper_decoder;
  logic [0:0] i2;  logic [1:0] i4;  logic [3:0] i16;
  logic en;
  logic [1:0]  o2;
  logic [3:0]  o4;
  logic [15:0] o16;
  int checks = 0, failures = 0;

  mapper_decoder #(.M(2))  u2  (.idx(i2),  .en, .op(o2));
  mapper_decoder #(.M(4))  u4  (.idx(i4),  .en, .op(o4));
  mapper_decoder #(.M(16)) u16 (.idx(i16), .en, .op(o16));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // published table: In2 In1 -> Op1..Op4
    logic [3:0] tab [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int v = 0; v < 16; v++) begin
        i2 = v[0:0]; i4 = v[1:0]; i16 = v[3:0];
        #1;
        chk(o2 == (en ? 2'(1 << v[0]) : 2'b0), "bpsk");
        chk(o4 == (en ? tab[v[1:0]] : 4'b0), "qpsk");
        chk(o16 == (en ? 16'(1 << v) : 16'b0), "16qam");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
