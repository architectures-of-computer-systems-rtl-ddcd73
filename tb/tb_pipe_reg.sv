// tb_pipe_reg: self-checking test of the interstage register, instantiated
// with a packed struct like the pipeline's own registers. Random EN (stall)
// and CLR (bubble/flush) patterns against a one-line model: CLR loads the
// clear value, otherwise EN loads D, otherwise the register holds. Reset
// loads the clear value.
module tb_pipe_reg;
  typedef struct packed {
    logic [31:0] data;
    logic [4:0]  rd;
    logic        reg_write;
  } payload_t;

  localparam payload_t CLR_V = '{data: 32'hdead_beef, rd: 5'd0, reg_write: 1'b0};

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  payload_t d = '0, q, model;
  int checks = 0, failures = 0, n_hold = 0, n_clr = 0;

  pipe_reg #(.T(payload_t), .CLEAR_VAL(CLR_V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #12;
    checks++;
    if (q !== CLR_V) failures++;
    rst_n = 1;
    model = CLR_V;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 5) == 0);
      d = {$urandom, 5'($urandom), 1'($urandom)};
      @(posedge clk);
      if (clr) begin model = CLR_V; n_clr++; end
      else if (en) model = d;
      else n_hold++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL en=%b clr=%b q=%h expected %h", en, clr, q, model);
      end
    end
    checks++;
    if (n_hold == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
