// tb_vq_se_cell: checks the squared-error cell, and its absolute-error
// variant in a second instance. Random signed samples (including the extreme
// values) and partial sums are applied with a random enable; after every
// edge the registered outputs must equal a + (x - u)^2 (a + |x - u| for the
// variant), x and u when enabled, and their old values otherwise.
module tb_vq_se_cell;
  localparam int unsigned W  = 8;
  localparam int unsigned DW = vq_pkg::dist_width(W, 3);

  logic clk = 1'b0, rst_n = 1'b0, en;
  logic signed [W-1:0]  x_in, u_in, y_out, v_out;
  logic        [DW-1:0] a_in, a_out, a_abs;
  logic signed [W-1:0]  y_abs, v_abs;
  int checks = 0, failures = 0;

  vq_se_cell #(.W(W), .DW(DW)) dut (.*);
  vq_se_cell #(.METRIC(vq_pkg::DIST_ABSOLUTE), .W(W), .DW(DW)) dut_abs (
    .clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .u_in(u_in), .a_in(a_in),
    .y_out(y_abs), .v_out(v_abs), .a_out(a_abs)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_a, exp_b;
    int     exp_y, exp_v;
    en = 0; x_in = '0; u_in = '0; a_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (a_out != '0 || y_out != '0 || v_out != '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      case (i % 10)
        0: begin x_in = W'(-(1 << (W - 1))); u_in = W'((1 << (W - 1)) - 1); end
        1: begin x_in = W'((1 << (W - 1)) - 1); u_in = W'(-(1 << (W - 1))); end
        default: begin x_in = W'($urandom); u_in = W'($urandom); end
      endcase
      a_in = DW'($urandom_range((1 << (DW - 1)) - 1, 0));
      en   = ($urandom_range(3, 0) != 0);
      if (en) begin
        exp_a = longint'(a_in) + (longint'(x_in) - longint'(u_in)) * (longint'(x_in) - longint'(u_in));
        exp_b = longint'(a_in) + ((x_in >= u_in) ? longint'(x_in) - longint'(u_in)
                                                 : longint'(u_in) - longint'(x_in));
        exp_y = int'(x_in);
        exp_v = int'(u_in);
      end else begin
        exp_a = longint'(a_out);
        exp_b = longint'(a_abs);
        exp_y = int'(y_out);
        exp_v = int'(v_out);
      end
      @(negedge clk);
      checks++;
      if (longint'(a_abs) != exp_b || y_abs != y_out || v_abs != v_out) begin
        failures++;
        $display("FAIL step %0d: absolute-error cell a %0d exp %0d", i, a_abs, exp_b);
      end
      checks++;
      if (longint'(a_out) != exp_a || int'(y_out) != exp_y || int'(v_out) != exp_v) begin
        failures++;
        $display("FAIL step %0d: a %0d exp %0d, y %0d exp %0d, v %0d exp %0d",
                 i, a_out, exp_a, y_out, exp_y, v_out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
