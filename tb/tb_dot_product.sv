// tb_dot_product: checks dotprod_{n,v} with N = 12, V = 4 (three chunks per
// vector) against a direct dot product, over back-to-back vectors, and checks
// that each result appears M = ceil(log2 V) + N/V = 5 cycles after the first
// chunk of its vector when the unit is never stalled.
module tb_dot_product;
  localparam int N = 12, V = 4, BW = 8, NV = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 1, vin = 0;
  logic [V-1:0][BW-1:0] x, w;
  logic vout;
  logic signed [2*BW+$clog2(N):0] z;

  dot_product #(.N(N), .V(V), .BW(BW)) dut (.clk, .rst_n, .en, .in_valid(vin), .x, .w, .out_valid(vout), .out_data(z));

  int checks = 0, failures = 0, cyc = 0;
  longint expq[$];
  int startq[$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    x = '0; w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      longint s;
      s = 0;
      for (int c = 0; c < N / V; c++) begin
        for (int i = 0; i < V; i++) begin
          x[i] = BW'($urandom); w[i] = BW'($urandom);
          s += longint'($signed(x[i])) * longint'($signed(w[i]));
        end
        if (c == 0) startq.push_back(cyc);
        vin = 1;
        @(negedge clk);
      end
      expq.push_back(s);
    end
    vin = 0;
    repeat (10) @(negedge clk);
    checks++; if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && vout) begin
    longint e;
    int st;
    e = expq.pop_front();
    st = startq.pop_front();
    checks += 2;
    if (z !== e) begin failures++; $display("got %0d exp %0d", z, e); end
    if (cyc - st != $clog2(V) + N / V) begin failures++; $display("latency %0d", cyc - st); end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
