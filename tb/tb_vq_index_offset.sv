// tb_vq_index_offset: checks the mod-N offset counter and the offset adder,
// for the default size (N = 4, K = 3, counter starting at 3) and for a
// codebook size that is not a power of two (N = 6, K = 2, starting at 5).
// phi2 enables come at random; the phi2/2 enable is every second one, on
// odd periods. In phi2 period p the offset must be (INIT + floor(p/2)) mod N
// and the registered index must be (row + offset) mod N of the period before.
module tb_vq_index_offset;
  localparam int unsigned N0 = 4, K0 = 3, IW0 = vq_pkg::id_width(N0);
  localparam int unsigned N1 = 6, K1 = 2, IW1 = vq_pkg::id_width(N1);

  logic clk = 1'b0, rst_n = 1'b0, en, half_en;
  logic [IW0-1:0] row0, index0, offset0;
  logic [IW1-1:0] row1, index1, offset1;
  int checks = 0, failures = 0, wraps = 0;

  vq_index_offset #(.N(N0), .K(K0)) dut0 (
    .clk(clk), .rst_n(rst_n), .en(en), .half_en(half_en),
    .row_id(row0), .index(index0), .offset(offset0)
  );
  vq_index_offset #(.N(N1), .K(K1)) dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .half_en(half_en),
    .row_id(row1), .index(index1), .offset(offset1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, e0, e1, off0, off1;
    en = 0; half_en = 0; row0 = '0; row1 = '0;
    p = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // the counter values given for the two sizes: N - floor(K/2)
    checks++;
    if (offset0 != IW0'(3) || offset1 != IW1'(5)) begin
      failures++;
      $display("FAIL initial offsets %0d %0d", offset0, offset1);
    end
    e0 = 0; e1 = 0;
    for (int i = 0; i < 1500; i++) begin
      en      = ($urandom_range(3, 0) != 0);
      half_en = en && (p % 2 == 1);
      row0    = IW0'($urandom_range(N0 - 1, 0));
      row1    = IW1'($urandom_range(N1 - 1, 0));
      off0    = (3 + p / 2) % N0;
      off1    = (5 + p / 2) % N1;
      if (en) begin
        e0 = (int'(row0) + off0) % N0;
        e1 = (int'(row1) + off1) % N1;
        if (int'(row1) + off1 >= N1) wraps++;
        p++;
      end
      @(negedge clk);
      checks++;
      if (int'(index0) != e0 || int'(index1) != e1 ||
          int'(offset0) != (3 + p / 2) % N0 || int'(offset1) != (5 + p / 2) % N1) begin
        failures++;
        $display("FAIL period %0d: index %0d %0d expected %0d %0d, offset %0d %0d",
                 p, index0, index1, e0, e1, offset0, offset1);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
