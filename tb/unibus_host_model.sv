// unibus_host_model: behavioural stand-in for the VAX side of the UNIBUS in
// testbenches. It holds a word-addressed memory at UNIBUS addresses
// 0..2*MEM_WORDS-1 that answers DATI/DATO from a bus master after MEM_DELAY
// clocks (no answer above it, so the master times out), grants NPR and BR
// requests at once, takes interrupt vectors (counting them), and offers tasks
// for programmed I/O by the VAX CPU. Not synthesizable.
module unibus_host_model #(
  parameter int MEM_WORDS = 4096,
  parameter int MEM_DELAY = 2
) (
  input  logic        clk,
  // from the device
  input  logic [17:0] dev_a,
  input  logic [1:0]  dev_c,
  input  logic        dev_ma_oe,
  input  logic [15:0] dev_d,
  input  logic        dev_d_oe,
  input  logic        dev_msyn,
  input  logic        dev_ssyn,
  input  logic        dev_npr,
  input  logic        dev_br,
  input  logic        dev_sack,
  input  logic        dev_intr,
  // resolved bus as seen by the device
  output logic [17:0] bus_a,
  output logic [1:0]  bus_c,
  output logic [15:0] bus_d,
  output logic        bus_msyn,
  output logic        bus_ssyn,
  output logic        npg,
  output logic        bg,
  output logic        bus_bbsy
);
  logic [15:0] mem [MEM_WORDS];
  logic [17:0] h_a = '0;
  logic [1:0]  h_c = '0;
  logic [15:0] h_d = '0;
  logic        h_msyn = 1'b0, h_bbsy = 1'b0;
  logic        m_ssyn = 1'b0;
  logic [15:0] m_d = '0;
  int          wait_cnt = 0;
  int          intr_count = 0;
  logic [15:0] last_vector = '0;
  int          dma_reads = 0, dma_writes = 0;

  initial begin npg = 1'b0; bg = 1'b0; end

  always_comb begin
    bus_a    = dev_ma_oe ? dev_a : h_a;
    bus_c    = dev_ma_oe ? dev_c : h_c;
    bus_msyn = h_msyn | (dev_msyn & dev_ma_oe);
    bus_ssyn = m_ssyn | dev_ssyn;
    bus_bbsy = h_bbsy;
    bus_d    = dev_d_oe ? dev_d : (m_ssyn ? m_d : h_d);
  end

  // arbiter
  always @(posedge clk) begin
    if (dev_sack) npg <= 1'b0;
    else if (dev_npr && !h_bbsy) npg <= 1'b1;
    if (dev_sack) bg <= 1'b0;
    else if (dev_br && !dev_npr && !h_bbsy) bg <= 1'b1;
  end

  // memory and interrupt slave
  always @(posedge clk) begin
    if (dev_intr && !m_ssyn) begin
      last_vector <= dev_d; intr_count <= intr_count + 1; m_ssyn <= 1'b1;
    end else if (dev_msyn && dev_ma_oe && !m_ssyn) begin
      if (wait_cnt < MEM_DELAY) wait_cnt <= wait_cnt + 1;
      else if (int'(dev_a >> 1) < MEM_WORDS) begin
        if (dev_c == 2'b10) begin mem[dev_a >> 1] <= dev_d; dma_writes <= dma_writes + 1; end
        else begin m_d <= mem[dev_a >> 1]; dma_reads <= dma_reads + 1; end
        m_ssyn <= 1'b1;
      end
    end else if (!dev_msyn && !dev_intr) begin
      m_ssyn <= 1'b0; wait_cnt <= 0;
    end
  end

  task automatic pio_write(input logic [17:0] a, input logic [15:0] d);
    @(posedge clk);
    h_a <= a; h_c <= 2'b10; h_d <= d; h_bbsy <= 1'b1;
    @(posedge clk); h_msyn <= 1'b1;
    while (!dev_ssyn) @(posedge clk);
    h_msyn <= 1'b0;
    while (dev_ssyn) @(posedge clk);
    h_bbsy <= 1'b0;
  endtask

  task automatic pio_read(input logic [17:0] a, output logic [15:0] d);
    @(posedge clk);
    h_a <= a; h_c <= 2'b00; h_bbsy <= 1'b1;
    @(posedge clk); h_msyn <= 1'b1;
    while (!dev_ssyn) @(posedge clk);
    @(posedge clk); d = dev_d;
    h_msyn <= 1'b0;
    while (dev_ssyn) @(posedge clk);
    h_bbsy <= 1'b0;
  endtask
endmodule
