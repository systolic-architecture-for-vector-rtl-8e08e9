// tb_vq_compare_cell: checks the comparing cell's rule. Random running
// minima and current distortions from a small range (so that ties are
// frequent) are applied with a random enable. When enabled the cell must
// pass b and ib if b < c, and otherwise c with its own identifier; equal
// values must go to the current row.
module tb_vq_compare_cell;
  localparam int unsigned DW = 6;
  localparam int unsigned IW = 3;
  localparam int unsigned ID = 5;

  logic clk = 1'b0, rst_n = 1'b0, en;
  logic [DW-1:0] b, c, z;
  logic [IW-1:0] ib, iz;
  int checks = 0, failures = 0, ties = 0;

  vq_compare_cell #(.DW(DW), .IW(IW), .ID(ID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_z, exp_i;
    en = 0; b = '0; c = '0; ib = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      b  = DW'($urandom_range(12, 0));
      c  = DW'($urandom_range(12, 0));
      ib = IW'($urandom_range(4, 0));
      en = ($urandom_range(4, 0) != 0);
      if (en) begin
        if (b < c) begin exp_z = b; exp_i = ib; end
        else begin exp_z = c; exp_i = ID; if (b == c) ties++; end
      end else begin
        exp_z = z; exp_i = iz;
      end
      @(negedge clk);
      checks++;
      if (int'(z) != exp_z || int'(iz) != exp_i) begin
        failures++;
        $display("FAIL step %0d: z %0d/%0d expected %0d/%0d", i, z, iz, exp_z, exp_i);
      end
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
