// skarab_pkg: constants and helper functions shared by the spectrometer blocks.
// The numbers are those of the two spectrometer personalities: 2048 channels over a
// 4096-point real FFT fed with 16 samples per clock (wideband), and 65536 channels over a
// complex FFT fed with one sample per clock (narrowband). Packets carry 8192-byte payloads
// on a 256-bit stream. bitrev() reverses the low n bits of an index and is used wherever
// FFT output order (bit-reversed) is converted to natural channel order.
package skarab_pkg;

  localparam int unsigned WB_NFFT     = 4096;   // wideband FFT length (real input)
  localparam int unsigned WB_LANES    = 16;     // parallel ADC samples per clock (bypass)
  localparam int unsigned WB_TAPS     = 14;     // PFB taps per channel (wideband)
  localparam int unsigned NB_NFFT     = 65536;  // narrowband FFT length (complex input)
  localparam int unsigned NB_TAPS     = 4;      // PFB taps per channel (narrowband)
  localparam int unsigned ADC_W       = 12;     // bypass-mode sample width
  localparam int unsigned DDC_W       = 16;     // DDC-mode sample width
  localparam int unsigned ACC_W       = 64;     // accumulator width
  localparam int unsigned OUT_W       = 32;     // requantised spectrum width
  localparam int unsigned BUS_W       = 256;    // 40 GbE stream width
  localparam int unsigned PKT_BYTES   = 8192;   // payload per UDP packet
  localparam int unsigned SPEAD_BYTES = 96;     // SPEAD header bytes

  function automatic int unsigned bitrev(input int unsigned v, input int unsigned n);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < n; i++) r |= ((v >> i) & 1) << (n - 1 - i);
    return r;
  endfunction

endpackage
