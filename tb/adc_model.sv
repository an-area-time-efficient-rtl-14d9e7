// adc_model: behavioural model of a 12-bit serial ADC with the framing of
// the ADCS7476: chip select falling starts a conversion and presents the
// first of 16 bits (4 leading zeros, then the code MSB first); each falling
// edge of the serial clock presents the next bit. The code is sampled at
// the chip-select edge. Outside a frame the data line is low.
module adc_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] code,
  output logic        sdata
);
  logic [15:0] sh = '0;
  logic        act = 1'b0;

  always @(negedge cs_n) begin
    sh  = {4'b0000, code};
    act = 1'b1;
  end
  always @(posedge cs_n) act = 1'b0;
  always @(negedge sclk) if (act) sh = {sh[14:0], 1'b0};

  assign sdata = act & sh[15];
endmodule
